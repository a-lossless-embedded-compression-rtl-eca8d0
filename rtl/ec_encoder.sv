// ec_encoder: lossless embedded compression encoder for 4x4 blocks.
//
// Four pipeline stages, each working on one block at a time:
//   catch   (ec_catch)    4 cycles to collect the block's four 32-bit rows
//                         into one of two buffers;
//   DPCM    (ec_dpcm)     16 cycles, pixel-wise DPCM along three scan modes;
//   CLP     (ec_clp)      16 cycles, code length prediction and the choice
//                         of scan mode or raw segment;
//   packing (ec_gr_pack)  16 cycles, Golomb-Rice coding and 32-bit packing.
// Stages hand over through valid/ready registers, so when rows arrive as
// fast as they are accepted the first segment's last word leaves 52 cycles
// after its first row and each further block needs 16 cycles, i.e. 4 + 23*16
// = 420 cycles for the 24 blocks of a 4:2:0 macroblock, as in the document.
//
// Interface: in_valid/in_ready/in_row/in_intra as in ec_catch (in_intra is
// the block's intra 4x4 prediction mode, sampled with row 0); out_valid,
// out_data, out_last, out_words as in ec_gr_pack. The output has no
// back-pressure: the bus must take a word whenever out_valid is high.
module ec_encoder
  import ec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_row,
  input  logic [3:0]  in_intra,
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic        out_last,
  output logic [2:0]  out_words
);

  logic       c_valid, c_release;
  blk_t       c_blk;
  logic [3:0] c_intra;
  logic       d_valid, d_ready;
  dpcm_out_t  d_out;
  logic       l_valid, l_ready;
  seg_t       l_out;

  ec_catch u_catch (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_row, .in_intra,
    .rd_valid(c_valid), .rd_blk(c_blk), .rd_intra(c_intra), .rd_release(c_release)
  );

  ec_dpcm u_dpcm (
    .clk, .rst_n,
    .in_valid(c_valid), .in_blk(c_blk), .in_intra(c_intra), .in_release(c_release),
    .out_valid(d_valid), .out_ready(d_ready), .out(d_out)
  );

  ec_clp u_clp (
    .clk, .rst_n,
    .in_valid(d_valid), .in_ready(d_ready), .in(d_out),
    .out_valid(l_valid), .out_ready(l_ready), .out(l_out)
  );

  ec_gr_pack u_pack (
    .clk, .rst_n,
    .in_valid(l_valid), .in_ready(l_ready), .in(l_out),
    .out_valid, .out_data, .out_last, .out_words
  );

endmodule
