// ec_gr_dec: Golomb-Rice decoder of the EC decoder.
//
// Solves one symbol per cycle from the top of the bit FIFO. Symbol 0 of a
// segment is its header: tag = 1 means a compressed segment followed by
// scan_mode (2 bits), k (3 bits) and first_pixel (8 bits); tag = 0 means a
// raw segment, followed by the first pixel only. Symbols 1..15 are, for a
// compressed segment, codewords [q zeros][1][k-bit r] whose value is
// (q << k) + r and whose length 1 + q + k is fed back to the FIFO; for a raw
// segment, 8-bit pixels. A symbol is solved only when all its bits are in
// the FIFO (sym_valid); otherwise the decoder waits. seg_done marks the
// cycle that solves symbol 15.
//
// Interface: window/buf_size from ec_bit_fifo, enable from the decoder
// control; sym_valid, sym_idx, sym_len (the consume count), sym_value and
// the header fields (combinational for symbol 0, held in registers for the
// rest of the segment, output as tag/mode/k). Following the document: the
// header layout, q/r split, value and length formulas. This design's
// choice: q is counted over a 40-bit window instead of 32 bits, because with
// the k rule a codeword can hold up to 32 leading zeros.
module ec_gr_dec
  import ec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [63:0] window,
  input  logic [6:0]  buf_size,
  output logic        sym_valid,
  output logic [3:0]  sym_idx,
  output logic [6:0]  sym_len,
  output map_t        sym_value,
  output logic        seg_done,
  output logic        tag,
  output scan_t       mode,
  output k_t          k,
  output pix_t        first
);

  logic [3:0] idx_q;
  logic       tag_q;
  scan_t      mode_q;
  k_t         k_q;

  logic [39:0] win40;
  logic [5:0]  q;
  logic        one_found;
  logic [6:0]  need;
  logic [5:0]  r;
  logic [12:0] val_full;

  assign win40   = window[63:24];
  assign sym_idx = idx_q;

  // leading-zero count (q)
  always_comb begin
    q = 6'd40;
    one_found = 1'b0;
    for (int i = 39; i >= 0; i--) begin
      if (!one_found && win40[i]) begin
        q = 6'(39 - i);
        one_found = 1'b1;
      end
    end
  end

  always_comb begin
    tag   = tag_q;
    mode  = mode_q;
    k     = k_q;
    first = window[50:43];
    r     = '0;
    val_full = '0;
    sym_value = '0;
    if (idx_q == 4'd0) begin
      tag   = window[63];
      mode  = scan_t'(window[62:61]);
      k     = window[60:58];
      first = tag ? window[57:50] : window[62:55];
      need  = tag ? 7'(HDR_BITS) : 7'(RAW_HDR);
      sym_value = map_t'(first);
    end else if (tag_q) begin
      need = 7'd1 + 7'(q) + 7'(k_q);
      // remainder: the k bits after the terminating one
      r = 6'((window << (7'(q) + 7'd1)) >> (7'd64 - 7'(k_q)));
      val_full  = (13'(q) << k_q) | 13'(r);
      sym_value = map_t'(val_full);
    end else begin
      need = 7'd8;
      sym_value = map_t'(window[63:56]);
    end
    // A header needs its tag bit before its length is known.
    sym_valid = enable && (buf_size != 7'd0) && (need <= buf_size) &&
                (idx_q == 4'd0 || !tag_q || one_found);
    sym_len   = sym_valid ? need : 7'd0;
    seg_done  = sym_valid && (idx_q == 4'd15);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q  <= '0;
      tag_q  <= 1'b0;
      mode_q <= SCAN0;
      k_q    <= '0;
    end else if (sym_valid) begin
      idx_q <= idx_q + 4'd1;   // wraps to 0 after symbol 15
      if (idx_q == 4'd0) begin
        tag_q  <= tag;
        mode_q <= tag ? mode : SCAN0;
        k_q    <= tag ? k : '0;
      end
    end
  end

endmodule
