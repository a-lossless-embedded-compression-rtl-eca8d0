// ec_addr_unit: address mapping and calculation of the memory controller.
//
// Every 4x4 block of a frame owns a fixed slot of SLOT_WORDS 32-bit words in
// the frame memory, whether its segment is compressed or not (direct
// mapping: a compressed segment simply leaves the end of its slot unused).
//
// De-blocking filter side (writes): the 20-bit address is {MB number (15
// bits), block number in the MB (5 bits, 0..15 luma, 16..19 Cb, 20..23
// Cr)}. Its slot address is (MB * 24 + block) * SLOT_WORDS. When block 0 of
// an MB is written, the MB's base address is stored in the translation
// buffer, one entry per MB. A second port (dr_addr/dr_phys) maps block
// addresses of the same format for reads of whole stored blocks.
//
// Motion compensation side (reads): a virtual address {MB_x, MB_y, block,
// MV_x, MV_y} (integer-pel vector, sub_pel adds the 2-left/3-right margin of
// the 6-tap interpolation, giving a 9x9 window instead of 4x4) is turned
// into the list of blocks that the displaced window touches: up to 2x2
// blocks for 4x4, up to 3x3 for 9x9. For each block the MB base comes from
// the translation buffer and the block's slot is added. Windows that leave
// the picture are clamped to the edge blocks. Blocks come out one per
// cycle on blk_valid/blk_ready with their physical address and their block
// coordinates in the plane (so the client can cut its window out).
//
// Following the document: direct mapping for the de-blocking filter, a
// per-MB translation buffer plus address calculation for motion
// compensation, 20-bit addresses, 2x2 and 3x3 block sets. This design's
// choices: the address formats, the slot size of 5 words (a raw segment is
// 129 bits) and edge clamping.
module ec_addr_unit
  import ec_pkg::*;
#(
  parameter int unsigned MB_W       = 120,  // 1920 / 16
  parameter int unsigned MB_H       = 68,   // 1088 / 16
  parameter int unsigned SLOT_WORDS = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  // de-blocking filter (write) side
  input  logic        df_map,        // a block address is being used
  input  logic [19:0] df_addr,
  output logic [19:0] df_phys,
  // direct mapping of a block read (same address format, e.g. display)
  input  logic [19:0] dr_addr,
  output logic [19:0] dr_phys,
  // motion compensation (read) side
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [6:0]  mb_x,
  input  logic [6:0]  mb_y,
  input  logic [4:0]  blk,
  input  logic signed [9:0] mv_x,
  input  logic signed [9:0] mv_y,
  input  logic        sub_pel,
  output logic        blk_valid,
  input  logic        blk_ready,
  output logic [19:0] blk_phys,
  output logic [8:0]  blk_bx,        // block column in the plane
  output logic [8:0]  blk_by,        // block row in the plane
  output logic        blk_last       // last block of the request
);

  localparam int unsigned NMB = MB_W * MB_H;

  logic [19:0] tbuf [NMB];           // translation buffer: MB base address

  // ---------------- de-blocking filter direct mapping ----------------
  logic [14:0] df_mb;
  logic [4:0]  df_blk;
  assign df_mb   = df_addr[19:5];
  assign df_blk  = df_addr[4:0];
  function automatic logic [19:0] slot_addr(input logic [19:0] a);
    return 20'((32'(a[19:5]) * 24 + 32'(a[4:0])) * SLOT_WORDS);
  endfunction

  assign df_phys = slot_addr(df_addr);
  assign dr_phys = slot_addr(dr_addr);

  always_ff @(posedge clk) begin
    if (df_map && df_blk == 5'd0 && 32'(df_mb) < NMB)
      tbuf[13'(df_mb)] <= df_phys;
  end

  // ---------------- motion compensation address calculation ----------
  typedef enum logic [1:0] {LUMA, CB, CR} comp_t;

  logic        busy_q;
  comp_t       comp_q;
  logic signed [11:0] bx0_q, bx1_q, by1_q, bx_q, by_q;

  comp_t       comp_n;
  logic [1:0]  lx, ly;               // block position inside the MB
  logic signed [12:0] x0, y0, x1, y1;
  logic signed [11:0] nbx, nby;

  function automatic logic signed [11:0] clamp(input logic signed [11:0] v,
                                               input logic signed [11:0] hi);
    if (v < 0)  return '0;
    if (v > hi) return hi;
    return v;
  endfunction

  always_comb begin
    comp_n = (blk < 5'd16) ? LUMA : (blk < 5'd20) ? CB : CR;
    if (comp_n == LUMA) begin
      lx = {blk[2], blk[0]};
      ly = {blk[3], blk[1]};
      nbx = 12'(MB_W * 4);
      nby = 12'(MB_H * 4);
      x0 = 13'(mb_x) * 16 + 13'(lx) * 4 + 13'(mv_x) - (sub_pel ? 13'sd2 : 13'sd0);
      y0 = 13'(mb_y) * 16 + 13'(ly) * 4 + 13'(mv_y) - (sub_pel ? 13'sd2 : 13'sd0);
    end else begin
      lx = {1'b0, blk[0]};
      ly = {1'b0, blk[1]};
      nbx = 12'(MB_W * 2);
      nby = 12'(MB_H * 2);
      x0 = 13'(mb_x) * 8 + 13'(lx) * 4 + 13'(mv_x) - (sub_pel ? 13'sd2 : 13'sd0);
      y0 = 13'(mb_y) * 8 + 13'(ly) * 4 + 13'(mv_y) - (sub_pel ? 13'sd2 : 13'sd0);
    end
    x1 = x0 + (sub_pel ? 13'sd8 : 13'sd3);
    y1 = y0 + (sub_pel ? 13'sd8 : 13'sd3);
  end

  assign req_ready = !busy_q;

  // physical address of the current block
  logic [8:0]  mbx_c, mby_c;
  logic [4:0]  blk_c;
  logic [19:0] base_c;
  always_comb begin
    if (comp_q == LUMA) begin
      mbx_c = 9'(bx_q >>> 2);
      mby_c = 9'(by_q >>> 2);
      blk_c = {1'b0, by_q[1], bx_q[1], by_q[0], bx_q[0]};
    end else begin
      mbx_c = 9'(bx_q >>> 1);
      mby_c = 9'(by_q >>> 1);
      blk_c = ((comp_q == CB) ? 5'd16 : 5'd20) + {3'b0, by_q[0], bx_q[0]};
    end
    base_c   = tbuf[32'(mby_c) * MB_W + 32'(mbx_c)];
    blk_phys = base_c + 20'(32'(blk_c) * SLOT_WORDS);
  end

  assign blk_valid = busy_q;
  assign blk_bx    = 9'(bx_q);
  assign blk_by    = 9'(by_q);
  assign blk_last  = (bx_q == bx1_q) && (by_q == by1_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      comp_q <= LUMA;
      bx0_q <= '0; bx1_q <= '0; by1_q <= '0;
      bx_q  <= '0; by_q  <= '0;
    end else if (!busy_q) begin
      if (req_valid) begin
        busy_q <= 1'b1;
        comp_q <= comp_n;
        bx0_q  <= clamp(12'(x0 >>> 2), nbx - 12'sd1);
        bx1_q  <= clamp(12'(x1 >>> 2), nbx - 12'sd1);
        by1_q  <= clamp(12'(y1 >>> 2), nby - 12'sd1);
        bx_q   <= clamp(12'(x0 >>> 2), nbx - 12'sd1);
        by_q   <= clamp(12'(y0 >>> 2), nby - 12'sd1);
      end
    end else if (blk_ready) begin
      if (blk_last) begin
        busy_q <= 1'b0;
      end else if (bx_q == bx1_q) begin
        bx_q <= bx0_q;
        by_q <= by_q + 12'sd1;
      end else begin
        bx_q <= bx_q + 12'sd1;
      end
    end
  end

endmodule
