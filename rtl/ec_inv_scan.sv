// ec_inv_scan: inverse Rice mapping, inverse DPCM along the scan mode and
// block output of the EC decoder.
//
// For each solved symbol of a compressed segment the Rice-mapped value is
// turned back into a difference by a bitwise inversion (the value's LSB is
// the sign), added to the running pixel register sum (8 bits, modulo 256)
// and the result is written into the 16-pixel block register at the raster
// position of that step of the scan. Symbol 0 loads sum with first_pixel.
// For a raw segment the 8-bit values go straight to raster positions 0..15.
// After symbol 15 the block leaves as four 32-bit rows, one per cycle
// (row 0 first, left pixel in bits [31:24]); busy is high during these four
// cycles so that the next segment is not decoded over the block.
//
// Timing: the pixel register is written at the end of the cycle that
// solves the symbol; the four rows are registered in the 4 cycles after
// symbol 15. With one symbol per cycle a segment takes 16 + 4 = 20 cycles,
// as in the document.
// Following the document: the remapping formula, the sum register, the
// 16 x 8-bit pixel register and 32-bit output. The row order is this
// design's choice.
module ec_inv_scan
  import ec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sym_valid,
  input  logic [3:0]  sym_idx,
  input  map_t        sym_value,
  input  logic        tag,
  input  scan_t       mode,
  input  pix_t        first,
  output logic        busy,
  output logic        out_valid,
  output logic [31:0] out_row,
  output logic        out_last
);

  pix_t       pxl_q [NPIX];
  pix_t       sum_q;
  logic [2:0] orow_q;      // 0 = idle, 1..4 = row to send + 1
  pix_t       s;
  logic [3:0] pos;

  assign busy = (orow_q != 3'd0);

  always_comb begin
    s   = sum_q + rice_unmap(sym_value)[7:0];
    pos = tag ? scan_pos(mode, sym_idx) : sym_idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pxl_q     <= '{default: '0};
      sum_q     <= '0;
      orow_q    <= '0;
      out_valid <= 1'b0;
      out_row   <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (sym_valid) begin
        if (sym_idx == 4'd0) begin
          sum_q      <= first;
          pxl_q[pos] <= first;
        end else if (tag) begin
          sum_q      <= s;
          pxl_q[pos] <= s;
        end else begin
          pxl_q[pos] <= sym_value[7:0];
        end
        if (sym_idx == 4'd15) orow_q <= 3'd1;
      end
      if (busy) begin
        out_valid <= 1'b1;
        out_row   <= {pxl_q[4*(orow_q-1)], pxl_q[4*(orow_q-1)+1],
                      pxl_q[4*(orow_q-1)+2], pxl_q[4*(orow_q-1)+3]};
        out_last  <= (orow_q == 3'd4);
        orow_q    <= (orow_q == 3'd4) ? 3'd0 : orow_q + 3'd1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(busy && sym_valid));

endmodule
