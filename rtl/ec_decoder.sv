// ec_decoder: lossless embedded compression decoder for one segment at a
// time.
//
// Bus words enter the bit FIFO (ec_bit_fifo); the Golomb-Rice decoder
// (ec_gr_dec) solves the header and then one codeword or raw pixel per cycle
// and tells the FIFO how many bits to drop; the inverse scan (ec_inv_scan)
// rebuilds the pixels and sends the block out as four 32-bit rows. When
// symbol 15 is solved the FIFO is flushed and seg_end pulses: the word
// source must then move on to the next segment's words. The source may feed
// words of a segment beyond its end (for instance the rest of its memory
// slot); they are dropped by the flush. While the four rows go out the FIFO
// may already load the next segment, and its decoding starts right after.
//
// Timing: 16 symbol cycles plus 4 output cycles, i.e. one block per 20
// cycles and 480 cycles per 4:2:0 macroblock when words arrive in time, as
// in the document.
module ec_decoder
  import ec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  output logic        seg_end,
  output logic        out_valid,
  output logic [31:0] out_row,
  output logic        out_last
);

  logic [63:0] window;
  logic [6:0]  buf_size;
  logic        sym_valid, seg_done, busy;
  logic [3:0]  sym_idx;
  logic [6:0]  sym_len;
  map_t        sym_value;
  logic        tag;
  scan_t       mode;
  k_t          k;
  pix_t        first;

  assign seg_end = seg_done;

  ec_bit_fifo u_fifo (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .consume(sym_len), .flush(seg_done),
    .window, .buf_size
  );

  ec_gr_dec u_grdec (
    .clk, .rst_n,
    .enable(!busy), .window, .buf_size,
    .sym_valid, .sym_idx, .sym_len, .sym_value, .seg_done,
    .tag, .mode, .k, .first
  );

  ec_inv_scan u_iscan (
    .clk, .rst_n,
    .sym_valid, .sym_idx, .sym_value, .tag, .mode, .first,
    .busy, .out_valid, .out_row, .out_last
  );

endmodule
