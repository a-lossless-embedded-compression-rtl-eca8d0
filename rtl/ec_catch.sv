// ec_catch: the "catch" stage of the EC encoder, a cache of two 128-bit
// block buffers used ping-pong.
//
// The de-blocking side writes a 4x4 block as four 32-bit rows (row 0 first,
// left pixel in bits [31:24]) through a valid/ready handshake; the intra 4x4
// prediction mode of the block is sampled with row 0. After the fourth row
// the buffer is marked full and the writer moves to the other buffer, so a
// block is caught in 4 cycles while the DPCM stage reads the other buffer
// for its 16 cycles. The reader sees the oldest full buffer on rd_blk /
// rd_intra while rd_valid is high, and frees it with a one-cycle rd_release.
// The two-buffer scheme and the 4-cycle catch follow the document; the row
// order and the handshake are this design's choices.
module ec_catch
  import ec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_row,
  input  logic [3:0]  in_intra,
  output logic        rd_valid,
  output blk_t        rd_blk,
  output logic [3:0]  rd_intra,
  input  logic        rd_release
);

  blk_t       buf_q   [2];
  logic [3:0] intra_q [2];
  logic [1:0] full_q;
  logic       wr_sel_q, rd_sel_q;
  logic [1:0] row_q;

  assign in_ready = !full_q[wr_sel_q];
  assign rd_valid = full_q[rd_sel_q];
  assign rd_blk   = buf_q[rd_sel_q];
  assign rd_intra = intra_q[rd_sel_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q   <= '0;
      wr_sel_q <= 1'b0;
      rd_sel_q <= 1'b0;
      row_q    <= '0;
      buf_q    <= '{default: '0};
      intra_q  <= '{default: '0};
    end else begin
      if (in_valid && in_ready) begin
        buf_q[wr_sel_q][127 - 32*row_q -: 32] <= in_row;
        if (row_q == 2'd0) intra_q[wr_sel_q] <= in_intra;
        row_q <= row_q + 2'd1;
        if (row_q == 2'd3) begin
          full_q[wr_sel_q] <= 1'b1;
          wr_sel_q         <= !wr_sel_q;
        end
      end
      if (rd_release && full_q[rd_sel_q]) begin
        full_q[rd_sel_q] <= 1'b0;
        rd_sel_q         <= !rd_sel_q;
      end
    end
  end

  // Releasing and filling never target the same buffer in one cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rd_release |-> rd_valid);

endmodule
