// ec_bit_fifo: synchronous FIFO with barrel shifter at the front of the EC
// decoder.
//
// A 64-bit register holds the not yet decoded bits, oldest bit in bit 63,
// and buf_size counts them. In every cycle the decoder may remove any number
// of bits from the top (consume, the length of the code it just solved) and,
// in the same cycle, a 32-bit bus word may be appended right behind what is
// left, if it fits. flush empties the register (end of a segment: the word
// padding and any word read past the segment are dropped) and refuses input
// for that cycle.
//
// Interface: in_valid/in_ready/in_data for bus words; window/buf_size to the
// decoder; consume and flush from it. The 64-bit buffer, 32-bit input and
// 7-bit size follow the document; the flush input is this design's choice.
module ec_bit_fifo (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic [6:0]  consume,
  input  logic        flush,
  output logic [63:0] window,
  output logic [6:0]  buf_size
);

  logic [63:0] buf_q;
  logic [6:0]  size_q;
  logic [63:0] b1, b2;
  logic [6:0]  s1, s2;

  assign window   = buf_q;
  assign buf_size = size_q;

  always_comb begin
    b1 = flush ? '0 : (buf_q << consume);
    s1 = flush ? '0 : (size_q - consume);
    in_ready = !flush && (s1 <= 7'd32);
    b2 = b1;
    s2 = s1;
    if (in_valid && in_ready) begin
      b2 = b1 | ({in_data, 32'b0} >> s1);
      s2 = s1 + 7'd32;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q  <= '0;
      size_q <= '0;
    end else begin
      buf_q  <= b2;
      size_q <= s2;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) consume <= size_q);

endmodule
