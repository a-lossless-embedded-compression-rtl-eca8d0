// ec_clp: code length predictor of the EC encoder.
//
// Takes the DPCM bundle of one block (three scan modes, each with 15
// Rice-mapped values and its k) and, one value per cycle over 15 cycles,
// adds the Golomb-Rice code length 1 + k + (value >> k) of each mode into a
// 13-bit register per mode. In the 16th cycle scan_mode_decision picks the
// shortest mode (the lower mode wins a tie) and checks the segment limit:
// when 13 parameter bits plus the code length reach 128 the block is sent
// raw (tag 0, the 16 pixels), otherwise compressed (tag 1) with that mode's
// values. The result is one seg_t bundle on out_valid/out_ready, which also
// carries the segment length in bits (1 + 13 + codes, or 129 for raw).
//
// Timing: 16 cycles per block, back to back; the input bundle is copied in
// the first cycle, so the DPCM stage may refill it at once. The three
// parallel accumulators, the 13-bit widths and the limit rule follow the
// document. Passing the raw block along, instead of undoing the Rice
// mapping, is this design's choice; both give the same pixels.
module ec_clp
  import ec_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  dpcm_out_t in,
  output logic      out_valid,
  input  logic      out_ready,
  output seg_t      out
);

  logic       active_q;
  logic [3:0] cnt_q;
  dpcm_out_t  work_q;
  len_t       len_q [NMODE];

  logic       go, last, advance;
  logic [3:0] j;
  dpcm_out_t  src;
  logic [1:0] best;
  len_t       best_len;
  len_t       total;

  assign go       = active_q || in_valid;
  assign j        = active_q ? cnt_q : 4'd0;
  assign last     = active_q && (cnt_q == 4'd15);
  assign advance  = go && (!last || !out_valid || out_ready);
  assign in_ready = !active_q;
  assign src      = active_q ? work_q : in;

  // scan_mode_decision
  always_comb begin
    best     = 2'd0;
    best_len = len_q[0];
    for (int m = 1; m < NMODE; m++) begin
      if (len_q[m] < best_len) begin
        best     = 2'(m);
        best_len = len_q[m];
      end
    end
    total = len_t'(PARAM_LEN) + best_len;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q  <= 1'b0;
      cnt_q     <= '0;
      work_q    <= '0;
      len_q     <= '{default: '0};
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (advance) begin
        if (j == 4'd0) work_q <= in;
        if (!last) begin
          for (int m = 0; m < NMODE; m++)
            len_q[m] <= ((j == 4'd0) ? '0 : len_q[m]) + gr_len(src.maps[m][j], src.k[m]);
          active_q <= 1'b1;
          cnt_q    <= j + 4'd1;
        end else begin
          active_q   <= 1'b0;
          cnt_q      <= '0;
          out_valid  <= 1'b1;
          out.pixels <= work_q.pixels;
          out.maps   <= work_q.maps[best];
          if (total < len_t'(SEG_LIMIT)) begin
            out.tag   <= 1'b1;
            out.mode  <= work_q.mode[best];
            out.k     <= work_q.k[best];
            out.first <= work_q.first[best];
            out.bits  <= total + 13'd1;
          end else begin
            out.tag   <= 1'b0;
            out.mode  <= SCAN0;
            out.k     <= '0;
            out.first <= get_pix(work_q.pixels, 4'd0);
            out.bits  <= 13'(RAW_HDR + 8 * NDIFF);
          end
        end
      end
    end
  end

endmodule
