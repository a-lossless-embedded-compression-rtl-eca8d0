// ec_gr_pack: Golomb-Rice coding with packing, last stage of the EC encoder.
//
// For one segment bundle it produces one code per cycle for 16 cycles:
// first the header (tag=1, scan_mode, k, first_pixel: 14 bits; or tag=0 and
// the first pixel: 9 bits), then the 15 remaining items. A compressed item
// is the Golomb-Rice codeword [q zeros][1][k-bit remainder] of its mapped
// value, q = value >> k; a raw item is the 8-bit pixel, in raster order.
// Each code is at most 14 significant bits (barrel_in) plus leading zeros,
// and a barrel shifter appends it, MSB first, behind the bits already held.
// Whenever 32 or more bits are held, the oldest 32 leave as one bus word.
// After the 16th code the segment is padded with zeros to a whole word, so
// every segment starts word aligned at its own address.
//
// Interface: seg_t bundle on in_valid/in_ready; out_valid/out_data one
// word per cycle with no back-pressure, out_last on the segment's last word
// together with out_words, the segment's word count (1..5).
// Timing: 16 cycles per segment; the last word of a segment leaves one
// cycle after its 16th code. Following the document: header layout, code
// construction and the barrel shift into 32-bit words. This design's
// choices: a 128-bit holding register instead of the drawn 64 bits (codes
// can carry up to 32 leading zeros) and word-aligned zero padding.
module ec_gr_pack
  import ec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  seg_t        in,
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic        out_last,
  output logic [2:0]  out_words
);

  localparam int unsigned ACC = 128;

  logic       active_q;
  logic [3:0] cnt_q;
  seg_t       work_q;
  logic [ACC-1:0] acc_q;
  logic [7:0] n_q;          // bits held in acc_q (MSB aligned)
  logic [2:0] seg_left_q;   // words still to send of a padded segment
  logic [2:0] wcnt_q;       // words sent of the current segment

  logic       go, last;
  logic [3:0] j;
  seg_t       src;
  logic [13:0] code;
  logic [8:0]  len;
  map_t        v;
  logic [8:0]  q;
  logic [ACC-1:0] acc1;
  logic [8:0]  n1;
  logic        emit;
  logic [2:0]  pend;

  assign go       = active_q || in_valid;
  assign j        = active_q ? cnt_q : 4'd0;
  assign last     = active_q && (cnt_q == 4'd15);
  assign in_ready = !active_q;
  assign src      = active_q ? work_q : in;

  // code_word / code_length
  always_comb begin
    v    = src.maps[(j == 4'd0) ? 4'd0 : j - 4'd1];
    q    = 9'(v >> src.k);
    code = '0;
    len  = '0;
    if (j == 4'd0) begin
      if (src.tag) begin
        code = {1'b1, src.mode, src.k, src.first};
        len  = 9'(HDR_BITS);
      end else begin
        code = {5'b0, 1'b0, src.first};
        len  = 9'(RAW_HDR);
      end
    end else if (src.tag) begin
      code = 14'((14'd1 << src.k) | (14'(v) & ((14'd1 << src.k) - 14'd1)));
      len  = 9'd1 + 9'(src.k) + q;
    end else begin
      code = 14'(get_pix(src.pixels, j));
      len  = 9'd8;
    end
  end

  // barrel shift, overflow check and padding
  always_comb begin
    acc1 = acc_q;
    n1   = 9'(n_q);
    if (go) begin
      acc1 = acc_q | (ACC'(code) << (9'(ACC) - 9'(n_q) - len));
      n1   = 9'(n_q) + len;
      if (last) n1 = (n1 + 9'd31) & ~9'd31;
    end
    emit = (n1 >= 9'd32);
    pend = 3'(n1 >> 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q   <= 1'b0;
      cnt_q      <= '0;
      work_q     <= '0;
      acc_q      <= '0;
      n_q        <= '0;
      seg_left_q <= '0;
      wcnt_q     <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_last   <= 1'b0;
      out_words  <= '0;
    end else begin
      if (go) begin
        if (j == 4'd0) work_q <= in;
        active_q <= !last;
        cnt_q    <= last ? 4'd0 : j + 4'd1;
      end
      out_valid <= emit;
      out_last  <= 1'b0;
      if (emit) begin
        out_data <= acc1[ACC-1 -: 32];
        acc_q    <= acc1 << 32;
        n_q      <= 8'(n1 - 9'd32);
      end else begin
        acc_q    <= acc1;
        n_q      <= 8'(n1);
      end
      if (go && last) begin
        // all held words now belong to the finished segment
        out_last   <= (pend == 3'd1);
        seg_left_q <= pend - 3'd1;
        wcnt_q     <= (pend == 3'd1) ? 3'd0 : wcnt_q + 3'd1;
        out_words  <= wcnt_q + 3'd1;
      end else if (emit) begin
        if (seg_left_q != 3'd0) begin
          out_last   <= (seg_left_q == 3'd1);
          seg_left_q <= seg_left_q - 3'd1;
          wcnt_q     <= (seg_left_q == 3'd1) ? 3'd0 : wcnt_q + 3'd1;
          out_words  <= wcnt_q + 3'd1;
        end else begin
          wcnt_q <= wcnt_q + 3'd1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) n1 <= 9'(ACC));

endmodule
