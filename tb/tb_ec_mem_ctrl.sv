// tb_ec_mem_ctrl: end-to-end testbench of the memory controller with the
// codec engine, at the default (1920x1088) frame parameters.
//
// A behavioural word memory stands for the SDRAM behind the system bus
// (random read latency of 1..3 cycles). The test
//   1. writes 3x3 macroblocks (luma and both chroma planes) block by block
//      as the de-blocking filter would, most of them smooth and one noisy,
//      so that compressed and raw segments both occur;
//   2. reads reference windows as motion compensation would: 4x4 and 9x9
//      (sub-pel) windows for luma and chroma blocks with random motion
//      vectors, some pointing out of the picture, and checks every returned
//      row against the written picture and the list of blocks against an
//      independent calculation; then reads whole blocks by their block
//      address, as a display feeder would;
//   3. checks that a segment read takes no more than one word beyond its
//      stored length, so compression saves bus words;
//   4. passes non-image data through in both directions, switches
//      compression off through the setup register, moves image data
//      uncompressed, and switches it back on.
// Each mechanism is counted and must occur at least once.
module tb_ec_mem_ctrl;

  localparam int MB_W = 120;
  localparam int NMB_X = 3, NMB_Y = 3;
  localparam int NREQ = 60;

  logic        clk = 0, rst_n = 0;
  logic        setup_we = 0;
  logic [31:0] setup_wdata = '0, setup_rdata;
  logic        mem_switch;
  logic        wr_valid = 0, wr_ready, wr_image = 0;
  logic [19:0] wr_addr = '0;
  logic [4:0]  wr_len = '0;
  logic [3:0]  wr_intra = '0;
  logic [31:0] wr_data = '0;
  logic        rd_valid = 0, rd_ready, rd_image = 0, rd_direct = 0;
  logic [19:0] rd_addr = '0;
  logic [4:0]  rd_len = '0;
  logic [6:0]  mb_x = '0, mb_y = '0;
  logic [4:0]  rd_blk = '0;
  logic signed [9:0] mv_x = '0, mv_y = '0;
  logic        sub_pel = 0;
  logic        rdata_valid, rdata_last;
  logic [31:0] rdata;
  logic [8:0]  rdata_bx, rdata_by;
  logic        bus_we, bus_wlast, bus_re;
  logic [19:0] bus_waddr, bus_raddr;
  logic [31:0] bus_wdata;
  logic [4:0]  bus_wlen;
  logic        bus_rvalid = 0;
  logic [31:0] bus_rdata = '0;

  ec_mem_ctrl dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int unsigned mem [int];            // SDRAM model
  int luma [48][48];
  int cb [24][24];
  int cr [24][24];
  int seg_words [int];               // slot address -> words written
  // mechanism counters
  int n_cmp = 0, n_raw = 0, n_win4 = 0, n_win9 = 0, n_clamp = 0, n_over = 0;
  int n_byp_wr = 0, n_byp_rd = 0, n_switch = 0, n_wstall = 0, n_chroma = 0, n_direct = 0;
  int words_img_read = 0, words_stored = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- SDRAM model ----------------
  int rd_wait = -1;
  int unsigned rd_a;
  int seg_start_w = -1;
  always @(posedge clk) begin
    if (bus_we) begin
      mem[int'(bus_waddr)] = bus_wdata;
      if (bus_wlast) begin
        seg_words[int'(bus_waddr) - int'(bus_wlen) + 1] = int'(bus_wlen);
      end
    end
    bus_rvalid <= 0;
    if (rd_wait > 0) rd_wait--;
    if (rd_wait == 0) begin
      bus_rvalid <= 1;
      bus_rdata  <= mem.exists(int'(rd_a)) ? mem[int'(rd_a)] : 32'hdead_beef;
      rd_wait = -1;
    end
    if (bus_re) begin
      rd_a = bus_raddr;
      rd_wait = $urandom_range(0, 2);
      if (rd_wait == 0) begin
        bus_rvalid <= 1;
        bus_rdata  <= mem.exists(int'(rd_a)) ? mem[int'(rd_a)] : 32'hdead_beef;
        rd_wait = -1;
      end
    end
  end

  // ---------------- picture ----------------
  function automatic int pel(input int plane, input int x, input int y);
    case (plane)
      0: return luma[y][x];
      1: return cb[y][x];
      default: return cr[y][x];
    endcase
  endfunction

  initial begin
    for (int y = 0; y < 48; y++)
      for (int x = 0; x < 48; x++)
        luma[y][x] = (x >= 32 && y >= 16 && y < 32) ? $urandom_range(0, 255)
                     : (40 + 2 * x + y + $urandom_range(0, 2)) % 256;
    for (int y = 0; y < 24; y++)
      for (int x = 0; x < 24; x++) begin
        cb[y][x] = 100 + x / 4 + $urandom_range(0, 1);
        cr[y][x] = 150 - y / 3 + $urandom_range(0, 1);
      end
  end

  // block origin (in pixels) of block b of an MB, plane and position
  function automatic void blk_pos(input int b, output int plane, output int ox, output int oy);
    if (b < 16) begin
      plane = 0;
      ox = 4 * (((b >> 2) & 1) * 2 + (b & 1));
      oy = 4 * (((b >> 3) & 1) * 2 + ((b >> 1) & 1));
    end else begin
      plane = (b < 20) ? 1 : 2;
      ox = 4 * (b & 1);
      oy = 4 * ((b >> 1) & 1);
    end
  endfunction

  function automatic int unsigned row_of(input int plane, input int x, input int y);
    return (32'(pel(plane, x, y)) << 24) | (32'(pel(plane, x + 1, y)) << 16) |
           (32'(pel(plane, x + 2, y)) << 8) | 32'(pel(plane, x + 3, y));
  endfunction

  // ---------------- client tasks ----------------
  task automatic write_xfer(input bit image, input int addr, input int len,
                            input int intra, input int unsigned data[$]);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      wr_valid <= 1; wr_image <= image; wr_addr <= 20'(addr); wr_len <= 5'(len);
      wr_intra <= 4'(intra); wr_data <= data[i];
      @(posedge clk);
      while (!wr_ready) begin
        if (image) n_wstall++;
        @(posedge clk);
      end
    end
    @(negedge clk);
    wr_valid <= 0;
  endtask

  task automatic write_mb(input int mx, input int my);
    for (int b = 0; b < 24; b++) begin
      int plane, ox, oy;
      int unsigned rows[$];
      blk_pos(b, plane, ox, oy);
      ox += (plane == 0 ? 16 : 8) * mx;
      oy += (plane == 0 ? 16 : 8) * my;
      for (int r = 0; r < 4; r++) rows.push_back(row_of(plane, ox, oy + r));
      write_xfer(1, ((my * MB_W + mx) << 5) | b, 4, $urandom_range(0, 8), rows);
    end
  endtask

  // expected block list of a motion compensation request
  function automatic void exp_blocks(input int mx, input int my, input int b, input int vx,
                                     input int vy, input bit sp, output int bl[$]);
    int plane, ox, oy, nb, x0, y0, x1, y1;
    blk_pos(b, plane, ox, oy);
    nb = (plane == 0) ? MB_W * 4 : MB_W * 2;
    x0 = (plane == 0 ? 16 : 8) * mx + ox + vx - (sp ? 2 : 0);
    y0 = (plane == 0 ? 16 : 8) * my + oy + vy - (sp ? 2 : 0);
    x1 = x0 + (sp ? 8 : 3);
    y1 = y0 + (sp ? 8 : 3);
    x0 = (x0 < 0) ? -((3 - x0) / 4) : x0 / 4;   // floor division
    y0 = (y0 < 0) ? -((3 - y0) / 4) : y0 / 4;
    x1 = (x1 < 0) ? -((3 - x1) / 4) : x1 / 4;
    y1 = (y1 < 0) ? -((3 - y1) / 4) : y1 / 4;
    x0 = (x0 < 0) ? 0 : x0;  y0 = (y0 < 0) ? 0 : y0;
    x1 = (x1 < 0) ? 0 : x1;  y1 = (y1 < 0) ? 0 : y1;
    x0 = (x0 >= nb) ? nb - 1 : x0;  x1 = (x1 >= nb) ? nb - 1 : x1;
    bl.delete();
    for (int by = y0; by <= y1; by++)
      for (int bx = x0; bx <= x1; bx++) bl.push_back((by << 16) | bx);
  endfunction

  task automatic mc_read(input int mx, input int my, input int b, input int vx,
                         input int vy, input bit sp);
    int bl[$];
    int plane, ox, oy, nrow, nblk, t0;
    bit done;
    exp_blocks(mx, my, b, vx, vy, sp, bl);
    blk_pos(b, plane, ox, oy);
    if (bl.size() == 4) n_win4++;
    if (bl.size() == 9) n_win9++;
    if (plane != 0) n_chroma++;
    if ((plane == 0 ? 16 : 8) * mx + ox + vx - (sp ? 2 : 0) < 0 ||
        (plane == 0 ? 16 : 8) * my + oy + vy - (sp ? 2 : 0) < 0) n_clamp++;
    @(negedge clk);
    img_read = 1;
    rd_valid <= 1; rd_image <= 1; mb_x <= 7'(mx); mb_y <= 7'(my); rd_blk <= 5'(b);
    mv_x <= 10'(vx); mv_y <= 10'(vy); sub_pel <= sp;
    @(posedge clk);
    while (!rd_ready) @(posedge clk);
    @(negedge clk);
    rd_valid <= 0;
    nrow = 0; nblk = 0; done = 0; t0 = cyc;
    while (!done && cyc - t0 < 2000) begin
      @(posedge clk);
      if (rdata_valid) begin
        int bx, by;
        int unsigned e;
        bx = int'(rdata_bx); by = int'(rdata_by);
        if (nrow == 0)
          check(nblk < bl.size() && bl[nblk] == ((by << 16) | bx),
                $sformatf("block %0d of request at (%0d,%0d)", nblk, bx, by));
        e = row_of(plane, 4 * bx, 4 * by + nrow);
        check(rdata == e, $sformatf("plane %0d block (%0d,%0d) row %0d: %h expected %h",
                                    plane, bx, by, nrow, rdata, e));
        nrow++;
        if (nrow == 4) begin
          nrow = 0;
          nblk++;
        end
        if (rdata_last) done = 1;
      end
    end
    img_read = 0;
    check(done && nblk == bl.size(), $sformatf("request returned %0d of %0d blocks", nblk, bl.size()));
  endtask

  // one stored block read by its block address (as a display feeder would)
  task automatic direct_read(input int mx, input int my, input int b);
    int plane, ox, oy, nrow, t0;
    blk_pos(b, plane, ox, oy);
    ox += (plane == 0 ? 16 : 8) * mx;
    oy += (plane == 0 ? 16 : 8) * my;
    @(negedge clk);
    img_read = 1;
    rd_valid <= 1; rd_image <= 1; rd_direct <= 1; rd_addr <= 20'(((my * MB_W + mx) << 5) | b);
    @(posedge clk);
    while (!rd_ready) @(posedge clk);
    @(negedge clk);
    rd_valid <= 0; rd_direct <= 0;
    nrow = 0; t0 = cyc;
    while (nrow < 4 && cyc - t0 < 500) begin
      @(posedge clk);
      if (rdata_valid) begin
        check(rdata == row_of(plane, ox, oy + nrow),
              $sformatf("direct read MB (%0d,%0d) block %0d row %0d: %h", mx, my, b, nrow, rdata));
        check(rdata_last == (nrow == 3), "direct read last row");
        nrow++;
      end
    end
    img_read = 0;
    check(nrow == 4, "direct read returned four rows");
    n_direct++;
  endtask

  // words read per segment must not exceed stored words + 1
  int reads_this_slot = 0;
  int cur_slot = -1;
  // (slots are 5-word aligned, so the word index is the address modulo 5)
  bit img_read = 0;
  always @(posedge clk) if (rst_n && bus_re && img_read) begin
    int slot_base;
    words_img_read++;
    slot_base = int'(bus_raddr) - int'(bus_raddr) % 5;
    if (slot_base != cur_slot || int'(bus_raddr) % 5 == 0) begin
      cur_slot = slot_base;
      reads_this_slot = 0;
    end
    reads_this_slot++;
    if (seg_words.exists(slot_base)) begin
      if (reads_this_slot > seg_words[slot_base]) n_over++;
      check(reads_this_slot <= seg_words[slot_base] + 1,
            $sformatf("slot %0d: %0d words read, %0d stored", slot_base, reads_this_slot,
                      seg_words[slot_base]));
    end
  end

  // ---------------- main sequence ----------------
  initial begin
    int unsigned d[$];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    check(setup_rdata == 32'h1, "setup register after reset");
    // 1. de-blocking filter writes
    for (int my = 0; my < NMB_Y; my++)
      for (int mx = 0; mx < NMB_X; mx++) write_mb(mx, my);
    repeat (80) @(posedge clk);
    foreach (seg_words[a]) begin
      words_stored += seg_words[a];
      if (seg_words[a] == 5) n_raw++; else n_cmp++;
    end
    check(seg_words.size() == NMB_X * NMB_Y * 24, $sformatf("%0d segments stored", seg_words.size()));
    // 2./3. motion compensation reads
    mc_read(0, 0, 0, -3, -5, 1);       // out of the picture, clamped
    mc_read(0, 0, 16, -4, -4, 1);      // chroma, clamped
    mc_read(0, 1, 5, -9, 0, 0);        // clamped on the left only
    mc_read(1, 1, 5, 0, 0, 0);         // aligned: a single block
    mc_read(1, 1, 12, 2, 1, 0);        // 2x2 blocks
    mc_read(1, 1, 3, 3, -2, 1);        // 3x3 blocks, sub-pel
    mc_read(1, 1, 17, 1, 2, 0);        // chroma Cb
    mc_read(1, 1, 22, -2, 3, 1);       // chroma Cr, sub-pel
    for (int i = 0; i < NREQ; i++) begin
      int b, lim;
      b = $urandom_range(0, 23);
      lim = (b < 16) ? 12 : 4;
      mc_read(1, 1, b, $urandom_range(0, 2 * lim) - lim, $urandom_range(0, 2 * lim) - lim,
              $urandom_range(0, 1));
    end
    // whole blocks by block address, compressed and raw ones
    for (int b = 0; b < 24; b++) direct_read(2, 1, b);
    direct_read(0, 0, 0);
    direct_read(1, 2, 21);
    // 4. pass-through traffic
    d = '{32'h1234_5678, 32'h9abc_def0, 32'h0bad_f00d, 32'h0000_0001, 32'hffff_ffff, 32'h5555_aaaa};
    write_xfer(0, 20'hF0000, 6, 0, d);
    n_byp_wr++;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 6; i++)
      check(mem.exists(32'hF0000 + i) && mem[32'hF0000 + i] == d[i], "pass-through write");
    raw_read(20'hF0000, 6, d);
    // compression off: image data moves unchanged
    @(negedge clk);
    setup_we <= 1; setup_wdata <= 32'h0;
    @(negedge clk);
    setup_we <= 0;
    n_switch++;
    check(setup_rdata == 32'h0, "setup register written");
    d = '{row_of(0, 0, 0), row_of(0, 0, 1), row_of(0, 0, 2), row_of(0, 0, 3)};
    write_xfer(1, 20'hE0000, 4, 0, d);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 4; i++)
      check(mem.exists(32'hE0000 + i) && mem[32'hE0000 + i] == d[i], "uncompressed image write");
    raw_read(20'hE0000, 4, d);
    check(!mem_switch, "codec idle while switched off");
    @(negedge clk);
    setup_we <= 1; setup_wdata <= 32'h1;
    @(negedge clk);
    setup_we <= 0;
    n_switch++;
    mc_read(1, 1, 0, 1, 1, 0);
    // summary of mechanisms
    $display("segments: %0d compressed, %0d raw; words stored %0d of %0d raw",
             n_cmp, n_raw, words_stored, NMB_X * NMB_Y * 24 * 4);
    $display("windows: %0d 2x2, %0d 3x3, %0d clamped, %0d chroma; over-fetch %0d; write stalls %0d",
             n_win4, n_win9, n_clamp, n_chroma, n_over, n_wstall);
    $display("pass-through writes %0d reads %0d; compression switches %0d; direct block reads %0d; image words read %0d",
             n_byp_wr, n_byp_rd, n_switch, n_direct, words_img_read);
    check(n_cmp > 0, "compressed segments occurred");
    check(n_raw > 0, "raw segments occurred");
    check(n_win4 > 0, "2x2 block windows occurred");
    check(n_win9 > 0, "3x3 block windows occurred");
    check(n_clamp > 0, "edge clamping occurred");
    check(n_chroma > 0, "chroma reads occurred");
    check(n_over > 0, "a word past a segment was dropped");
    check(n_wstall > 0, "image writes were held back");
    check(n_byp_wr > 0 && n_byp_rd > 0, "pass-through traffic occurred");
    check(n_direct > 0, "direct block reads occurred");
    check(n_switch == 2, "compression switched off and on");
    check(words_stored < NMB_X * NMB_Y * 24 * 4, "compression saved memory words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic raw_read(input int addr, input int len, input int unsigned exp_d[$]);
    int n = 0, t0;
    @(negedge clk);
    rd_valid <= 1; rd_image <= (len == 4); rd_addr <= 20'(addr); rd_len <= 5'(len);
    @(posedge clk);
    while (!rd_ready) @(posedge clk);
    @(negedge clk);
    rd_valid <= 0;
    t0 = cyc;
    while (n < len && cyc - t0 < 200) begin
      @(posedge clk);
      if (rdata_valid) begin
        check(rdata == exp_d[n], $sformatf("pass-through read word %0d: %h", n, rdata));
        check(rdata_last == (n == len - 1), "pass-through read last");
        n++;
      end
    end
    check(n == len, "pass-through read complete");
    n_byp_rd++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
