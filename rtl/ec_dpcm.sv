// ec_dpcm: pixel-wise DPCM stage of the EC encoder, run for three scan
// modes in parallel.
//
// The intra 4x4 prediction mode of the block picks the three scan modes
// (scan_mode_0, scan_mode_1 and scan_mode_3 or scan_mode_4). In each of 16
// cycles a selector takes the j-th pixel of every scan from the catch
// buffer; from the second pixel on, the difference to the previous pixel of
// the same scan is Rice mapped and stored, and its magnitude is added to a
// 13-bit sum. After the 16th pixel the k-value of each scan is derived from
// its sum and the whole result is handed on as one dpcm_out_t bundle
// (out_valid/out_ready). The catch buffer is released in the same cycle.
//
// Timing: a block occupies the stage for exactly 16 cycles, and a new block
// starts in the cycle after the previous one ends, so the stage sustains one
// block per 16 cycles. Following the document: the selector, the previous
// pixel register, 9-bit subtraction, Rice mapping by bit inversion, 13-bit
// sum and the priority rule for k. This design's choices: the current pixel
// is used straight from the selector (one register fewer than the drawn
// pxl_1/pxl_0 pair), and the sum accumulates |difference| rather than the
// mapped value, which is what reproduces the document's worked example
// (k = 1 for a block whose magnitudes add up to 21). Three bits of the
// bundle are constant: the mode codes of the first two slots (always scan 0
// and scan 1) and the upper bit of the third (always scan 3 or 4); they are
// kept so that every slot has the same form.
module ec_dpcm
  import ec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  blk_t       in_blk,
  input  logic [3:0] in_intra,
  output logic       in_release,
  output logic       out_valid,
  input  logic       out_ready,
  output dpcm_out_t  out
);

  logic       active_q;
  logic [3:0] cnt_q;
  pix_t       prev_q [NMODE];
  len_t       sum_q  [NMODE];
  map_t [NMODE-1:0][NDIFF-1:0] maps_q;

  logic       go, last, advance;
  logic [3:0] j;
  scan_t      mode [NMODE];
  pix_t       pix  [NMODE];
  diff_t      d    [NMODE];
  map_t       mval [NMODE];
  len_t       sum_n[NMODE];

  assign go      = active_q || in_valid;
  assign j       = active_q ? cnt_q : 4'd0;
  assign last    = active_q && (cnt_q == 4'd15);
  // The last cycle may only complete when the output register is free.
  assign advance = go && (!last || !out_valid || out_ready);
  assign in_release = last && advance;

  always_comb begin
    mode[0] = SCAN0;
    mode[1] = SCAN1;
    mode[2] = third_mode(in_intra);
    for (int m = 0; m < NMODE; m++) begin
      pix[m]   = get_pix(in_blk, scan_pos(mode[m], j));
      d[m]     = {1'b0, pix[m]} - {1'b0, prev_q[m]};
      mval[m]  = rice_map(d[m]);
      sum_n[m] = sum_q[m] + len_t'(abs_diff(d[m]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q  <= 1'b0;
      cnt_q     <= '0;
      prev_q    <= '{default: '0};
      sum_q     <= '{default: '0};
      maps_q    <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (advance) begin
        for (int m = 0; m < NMODE; m++) begin
          prev_q[m] <= pix[m];
          if (j == 4'd0) begin
            sum_q[m] <= '0;
          end else begin
            sum_q[m]              <= sum_n[m];
            maps_q[m][int'(j)-1]  <= mval[m];
          end
        end
        if (last) begin
          active_q  <= 1'b0;
          cnt_q     <= '0;
          out_valid <= 1'b1;
          out.pixels <= in_blk;
          for (int m = 0; m < NMODE; m++) begin
            out.mode[m]  <= mode[m];
            out.first[m] <= get_pix(in_blk, scan_pos(mode[m], 4'd0));
            out.k[m]     <= k_of_sum(sum_n[m]);
            for (int i = 0; i < NDIFF - 1; i++) out.maps[m][i] <= maps_q[m][i];
            out.maps[m][NDIFF-1] <= mval[m];
          end
        end else begin
          active_q <= 1'b1;
          cnt_q    <= j + 4'd1;
        end
      end
    end
  end

endmodule
