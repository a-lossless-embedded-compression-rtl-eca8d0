// ec_mem_ctrl: memory controller with the lossless embedded compression
// codec engine; the top of this design.
//
// It sits between the decoder's IP blocks and the system bus to the frame
// memory. Image transfers are compressed on the way out and decompressed on
// the way back; everything else passes unchanged:
//   * write side (de-blocking filter and other writers): a transfer is
//     wr_len 32-bit beats at wr_addr. With wr_image set and compression
//     enabled, the transfer is one 4x4 block (4 rows), wr_addr is its block
//     address {MB number, block number} and wr_intra its intra 4x4 mode; the
//     block goes through ec_encoder and its segment (1..5 words) is written
//     to the block's slot. Otherwise the beats are written at wr_addr + i.
//   * read side (motion compensation and other readers): with rd_image set
//     and compression enabled, the request is a virtual address {MB_x, MB_y,
//     block, MV_x, MV_y, sub_pel}; ec_addr_unit lists the 4 or 9 blocks the
//     reference window touches, ec_decoder decodes each from its slot, word
//     by word, reading only the words the segment needs (plus at most one),
//     and the rows come back on rdata with their block coordinates.
//     With rd_direct also set, the request is a single stored block at
//     the block address rd_addr (the format the writer used, as a display
//     feeder would read a picture): its four rows come back with
//     rdata_bx/rdata_by at 0. Otherwise rd_len words are read from rd_addr.
//   * setup: a 32-bit register written through setup_we/setup_wdata and read
//     back on setup_rdata; bit 0 enables compression (1 after reset), the
//     other bits are stored for software and have no effect.
//   * mem_switch is high while the codec engine carries a transfer.
//
// Bus side: word writes (bus_we, bus_waddr, bus_wdata; bus_wlast and
// bus_wlen, the words of the transfer, on its last word) and word reads
// (bus_re, bus_raddr; one read outstanding, its data on bus_rvalid /
// bus_rdata one or more cycles later). Encoder output has priority on the
// write port; pass-through writes wait for free cycles.
//
// Following the document: placement between clients and bus, the
// controller that recognises image data and decides on compression, the
// data, length and address multiplexers, 32-bit data, 5-bit lengths and
// 20-bit addresses, direct mapping for writes and translated addresses for
// motion compensation reads. The signalling of both sides is this design's
// own, as the document does not give it.
module ec_mem_ctrl
  import ec_pkg::*;
#(
  parameter int unsigned MB_W       = 120,
  parameter int unsigned MB_H       = 68,
  parameter int unsigned SLOT_WORDS = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  // setup
  input  logic        setup_we,
  input  logic [31:0] setup_wdata,
  output logic [31:0] setup_rdata,
  output logic        mem_switch,
  // write client
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic        wr_image,
  input  logic [19:0] wr_addr,
  input  logic [4:0]  wr_len,
  input  logic [3:0]  wr_intra,
  input  logic [31:0] wr_data,
  // read client
  input  logic        rd_valid,
  output logic        rd_ready,
  input  logic        rd_image,
  input  logic        rd_direct,
  input  logic [19:0] rd_addr,
  input  logic [4:0]  rd_len,
  input  logic [6:0]  mb_x,
  input  logic [6:0]  mb_y,
  input  logic [4:0]  rd_blk,
  input  logic signed [9:0] mv_x,
  input  logic signed [9:0] mv_y,
  input  logic        sub_pel,
  output logic        rdata_valid,
  output logic [31:0] rdata,
  output logic        rdata_last,
  output logic [8:0]  rdata_bx,
  output logic [8:0]  rdata_by,
  // system bus
  output logic        bus_we,
  output logic [19:0] bus_waddr,
  output logic [31:0] bus_wdata,
  output logic        bus_wlast,
  output logic [4:0]  bus_wlen,
  output logic        bus_re,
  output logic [19:0] bus_raddr,
  input  logic        bus_rvalid,
  input  logic [31:0] bus_rdata
);

  localparam int unsigned AQ = 8;   // blocks in flight in the encoder

  // ---------------- controller: setup register ----------------
  logic [31:0] setup_q;           // bit 0: compression on; others kept
  logic        ec_en_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        setup_q <= 32'h1;
    else if (setup_we) setup_q <= setup_wdata;
  end
  assign ec_en_q     = setup_q[0];
  assign setup_rdata = setup_q;

  // ---------------- address unit ----------------
  logic        df_map;
  logic [19:0] df_phys, dr_phys;
  logic        au_req_valid, au_req_ready;
  logic        blk_valid, blk_ready, blk_last;
  logic [19:0] blk_phys;
  logic [8:0]  blk_bx, blk_by;

  ec_addr_unit #(.MB_W(MB_W), .MB_H(MB_H), .SLOT_WORDS(SLOT_WORDS)) u_addr (
    .clk, .rst_n,
    .df_map, .df_addr(wr_addr), .df_phys,
    .dr_addr(rd_addr), .dr_phys,
    .req_valid(au_req_valid), .req_ready(au_req_ready),
    .mb_x, .mb_y, .blk(rd_blk), .mv_x, .mv_y, .sub_pel,
    .blk_valid, .blk_ready, .blk_phys, .blk_bx, .blk_by, .blk_last
  );

  // ======================= write side =======================
  logic        enc_in_valid, enc_in_ready;
  logic        enc_out_valid, enc_out_last;
  logic [31:0] enc_out_data;
  logic [2:0]  enc_out_words;

  ec_encoder u_enc (
    .clk, .rst_n,
    .in_valid(enc_in_valid), .in_ready(enc_in_ready),
    .in_row(wr_data), .in_intra(wr_intra),
    .out_valid(enc_out_valid), .out_data(enc_out_data),
    .out_last(enc_out_last), .out_words(enc_out_words)
  );

  logic [4:0]  wbeat_q;
  logic        wcodec_q;          // mode of the transfer under way
  logic        wcodec;
  logic [19:0] aq_mem [AQ];       // slot addresses of blocks in the encoder
  logic [$clog2(AQ):0] aq_wr_q, aq_rd_q;
  logic        aq_full;
  logic [2:0]  ocnt_q;            // word of the segment being written
  logic        raw_we;

  assign wcodec  = (wbeat_q == 5'd0) ? (wr_image && ec_en_q) : wcodec_q;
  assign aq_full = (aq_wr_q - aq_rd_q) == ($clog2(AQ)+1)'(AQ);
  assign df_map  = wr_valid && wr_ready && wr_image && (wbeat_q == 5'd0);

  always_comb begin
    enc_in_valid = 1'b0;
    raw_we       = 1'b0;
    if (wcodec) begin
      wr_ready     = enc_in_ready && !(wbeat_q == 5'd0 && aq_full);
      enc_in_valid = wr_valid && wr_ready;
    end else begin
      wr_ready = !enc_out_valid;
      raw_we   = wr_valid && wr_ready;
    end
  end

  always_comb begin
    bus_we    = 1'b0;
    bus_waddr = '0;
    bus_wdata = '0;
    bus_wlast = 1'b0;
    bus_wlen  = '0;
    if (enc_out_valid) begin
      bus_we    = 1'b1;
      bus_waddr = aq_mem[aq_rd_q[$clog2(AQ)-1:0]] + 20'(ocnt_q);
      bus_wdata = enc_out_data;
      bus_wlast = enc_out_last;
      bus_wlen  = 5'(enc_out_words);
    end else if (raw_we) begin
      bus_we    = 1'b1;
      bus_waddr = wr_addr + 20'(wbeat_q);
      bus_wdata = wr_data;
      bus_wlast = (wbeat_q == wr_len - 5'd1);
      bus_wlen  = wr_len;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbeat_q  <= '0;
      wcodec_q <= 1'b0;
      aq_wr_q  <= '0;
      aq_rd_q  <= '0;
      ocnt_q   <= '0;
    end else begin
      if (wr_valid && wr_ready) begin
        if (wbeat_q == 5'd0) wcodec_q <= wcodec;
        if (wcodec && wbeat_q == 5'd0) aq_wr_q <= aq_wr_q + 1'b1;
        wbeat_q <= (wbeat_q == (wcodec ? 5'd3 : wr_len - 5'd1)) ? 5'd0 : wbeat_q + 5'd1;
      end
      if (enc_out_valid) begin
        if (enc_out_last) begin
          ocnt_q  <= '0;
          aq_rd_q <= aq_rd_q + 1'b1;
        end else begin
          ocnt_q <= ocnt_q + 3'd1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready && wcodec && wbeat_q == 5'd0)
      aq_mem[aq_wr_q[$clog2(AQ)-1:0]] <= df_phys;
  end

  // ======================= read side =======================
  typedef enum logic [1:0] {R_IDLE, R_IMG, R_RAW} rstate_t;
  rstate_t     rstate_q;

  logic        dec_in_valid, dec_in_ready, seg_end;
  logic        dec_out_valid, dec_out_last;
  logic [31:0] dec_out_row;

  ec_decoder u_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .in_data(bus_rdata),
    .seg_end,
    .out_valid(dec_out_valid), .out_row(dec_out_row), .out_last(dec_out_last)
  );

  logic        pend_q;            // a bus read is outstanding
  logic        drop_q;            // ... and its data belongs to a finished segment
  logic [2:0]  widx_q;            // next word of the current slot
  logic [19:0] raddr_q;
  logic [4:0]  rcnt_q, rlen_q, rgot_q;
  logic [8:0]  obx_q, oby_q;      // block now leaving the decoder
  logic        olast_q;
  logic        dir_q;             // direct read of one block
  logic [19:0] dphys_q;
  logic        cur_valid, cur_last;
  logic [19:0] cur_phys;

  assign cur_valid = dir_q || blk_valid;
  assign cur_last  = dir_q || blk_last;
  assign cur_phys  = dir_q ? dphys_q : blk_phys;

  assign rd_ready     = (rstate_q == R_IDLE) &&
                        (!(rd_image && ec_en_q && !rd_direct) || au_req_ready);
  assign au_req_valid = (rstate_q == R_IDLE) && rd_valid && rd_image && ec_en_q && !rd_direct;
  assign blk_ready    = (rstate_q == R_IMG) && seg_end && !dir_q;
  assign dec_in_valid = (rstate_q == R_IMG) && bus_rvalid && pend_q && !drop_q;

  always_comb begin
    bus_re    = 1'b0;
    bus_raddr = '0;
    if (rstate_q == R_IMG && cur_valid && !pend_q && !seg_end &&
        dec_in_ready && widx_q < 3'(SLOT_WORDS)) begin
      bus_re    = 1'b1;
      bus_raddr = cur_phys + 20'(widx_q);
    end else if (rstate_q == R_RAW && !pend_q && rcnt_q != rlen_q) begin
      bus_re    = 1'b1;
      bus_raddr = raddr_q + 20'(rcnt_q);
    end
  end

  always_comb begin
    rdata_valid = 1'b0;
    rdata       = '0;
    rdata_last  = 1'b0;
    rdata_bx    = obx_q;
    rdata_by    = oby_q;
    if (rstate_q == R_IMG) begin
      rdata_valid = dec_out_valid;
      rdata       = dec_out_row;
      rdata_last  = dec_out_last && olast_q;
    end else if (rstate_q == R_RAW) begin
      rdata_valid = bus_rvalid && pend_q;
      rdata       = bus_rdata;
      rdata_last  = bus_rvalid && pend_q && (rgot_q == rlen_q - 5'd1);
    end
  end

  assign mem_switch = (wr_valid && wcodec) || enc_out_valid || (rstate_q == R_IMG);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate_q <= R_IDLE;
      pend_q   <= 1'b0;
      drop_q   <= 1'b0;
      widx_q   <= '0;
      raddr_q  <= '0;
      rcnt_q   <= '0;
      rlen_q   <= '0;
      rgot_q   <= '0;
      obx_q    <= '0;
      oby_q    <= '0;
      olast_q  <= 1'b0;
      dir_q    <= 1'b0;
      dphys_q  <= '0;
    end else begin
      if (bus_re) pend_q <= 1'b1;
      else if (bus_rvalid) pend_q <= 1'b0;
      case (rstate_q)
        R_IDLE: if (rd_valid && rd_ready) begin
          if (rd_image && ec_en_q) begin
            rstate_q <= R_IMG;
            widx_q   <= '0;
            dir_q    <= rd_direct;
            dphys_q  <= dr_phys;
          end else begin
            rstate_q <= R_RAW;
            raddr_q  <= rd_addr;
            rlen_q   <= rd_len;
            rcnt_q   <= '0;
            rgot_q   <= '0;
          end
        end
        R_IMG: begin
          if (bus_re) widx_q <= widx_q + 3'd1;
          if (bus_rvalid) drop_q <= 1'b0;
          if (seg_end) begin
            widx_q  <= '0;
            obx_q   <= dir_q ? 9'd0 : blk_bx;
            oby_q   <= dir_q ? 9'd0 : blk_by;
            olast_q <= cur_last;
            dir_q   <= 1'b0;      // a direct read is a single block
            if (pend_q && !bus_rvalid) drop_q <= 1'b1;
          end
          if (dec_out_valid && dec_out_last && olast_q) rstate_q <= R_IDLE;
        end
        R_RAW: begin
          if (bus_re) rcnt_q <= rcnt_q + 5'd1;
          if (bus_rvalid && pend_q) begin
            rgot_q <= rgot_q + 5'd1;
            if (rgot_q == rlen_q - 5'd1) rstate_q <= R_IDLE;
          end
        end
        default: rstate_q <= R_IDLE;
      endcase
    end
  end

  // Image writes are one block of four rows.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr_valid && wr_image && ec_en_q && wbeat_q == 5'd0) |-> wr_len == 5'd4);
  // At most one bus read outstanding.
  assert property (@(posedge clk) disable iff (!rst_n) bus_re |-> !pend_q);

endmodule
