// tb_ec_hdtv_frame: workload testbench, one whole 1920x1088 4:2:0 picture
// through the memory controller at its default parameters.
//
// A synthetic picture (smooth gradients with mild noise, a band of textured
// macroblocks and a noisy corner) is computed from the pixel coordinates,
// so no picture data is stored. All 8160 macroblocks are written block by
// block as the de-blocking filter would, with the writer always ready; the
// cycles per macroblock must stay within the 420 the encoder needs (plus a
// few cycles of drain at the end), below the about 490 cycles a macroblock
// may take at 120 MHz and 30 pictures/s. Every block of the picture is then
// read back by its block address through the decoder and compared row by
// row with the picture, and the words stored and read are totalled. The
// frame memory model answers every read on the next cycle. Each block is
// requested once the previous block's last row is out; this costs 24 cycles
// per block (576 per macroblock): the decoder's 20 plus 4 between one
// block's last row and the next request's start, which this testbench
// bounds.
module tb_ec_hdtv_frame;

  localparam int MB_W = 120, MB_H = 68;
  localparam int NMB = MB_W * MB_H;

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

  int checks = 0, failures = 0, cyc = 0;
  int unsigned mem [int];
  longint words_stored = 0, words_read = 0, n_raw = 0;
  int last_write = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // frame memory: writes, and reads answered on the next cycle
  always @(posedge clk) begin
    bus_rvalid <= bus_re;
    if (bus_re) begin
      bus_rdata <= mem.exists(int'(bus_raddr)) ? mem[int'(bus_raddr)] : 32'h0;
      words_read++;
    end
    if (bus_we) begin
      mem[int'(bus_waddr)] = bus_wdata;
      last_write = cyc;
      if (bus_wlast) begin
        words_stored += bus_wlen;
        if (bus_wlen == 5'd5) n_raw++;
      end
    end
  end

  // synthetic picture: plane 0 luma 1920x1088, planes 1/2 chroma 960x544
  function automatic int pel(input int plane, input int x, input int y);
    int h, v;
    h = ((x * 7919) ^ (y * 104729) ^ (plane * 31)) & 32'h7fff_ffff;
    h = (h * 1103515245 + 12345) >>> 16;
    if (plane == 0) begin
      if (x >= 1792 && y >= 960) v = h & 255;                       // noisy corner
      else if ((y / 16) % 17 == 5) v = 128 + ((x % 8 < 4) ? 40 : -40) + (h & 7);
      else v = 60 + x / 16 + y / 12 + (h & 3);
    end else begin
      v = (plane == 1 ? 110 : 140) + x / 32 - y / 40 + (h & 1);
    end
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic int unsigned row_of(input int plane, input int x, input int y);
    return (32'(pel(plane, x, y)) << 24) | (32'(pel(plane, x + 1, y)) << 16) |
           (32'(pel(plane, x + 2, y)) << 8) | 32'(pel(plane, x + 3, y));
  endfunction

  function automatic void blk_org(input int mb, input int b, output int plane, output int ox,
                                  output int oy);
    int mx = mb % MB_W, my = mb / MB_W;
    if (b < 16) begin
      plane = 0;
      ox = 16 * mx + 4 * (((b >> 2) & 1) * 2 + (b & 1));
      oy = 16 * my + 4 * (((b >> 3) & 1) * 2 + ((b >> 1) & 1));
    end else begin
      plane = (b < 20) ? 1 : 2;
      ox = 8 * mx + 4 * (b & 1);
      oy = 8 * my + 4 * ((b >> 1) & 1);
    end
  endfunction

  initial begin
    int t0, t_wr, t1, t_rd;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // ---------------- write the picture ----------------
    @(negedge clk);
    t0 = cyc;
    for (int mb = 0; mb < NMB; mb++)
      for (int b = 0; b < 24; b++) begin
        int plane, ox, oy;
        blk_org(mb, b, plane, ox, oy);
        for (int r = 0; r < 4; r++) begin
          wr_valid = 1; wr_image = 1; wr_len = 5'd4;
          wr_addr  = 20'((mb << 5) | b);
          wr_intra = 4'((mb + b) % 9);
          wr_data  = row_of(plane, ox, oy + r);
          @(posedge clk);
          while (!wr_ready) @(posedge clk);
          @(negedge clk);
        end
      end
    wr_valid = 0;
    repeat (100) @(posedge clk);
    t_wr = last_write - t0;
    $display("picture written in %0d cycles, %0.1f per macroblock; %0d words stored of %0d, %0d raw segments",
             t_wr, real'(t_wr) / NMB, words_stored, NMB * 24 * 4, n_raw);
    check(t_wr <= NMB * 420 + 100, "within 420 cycles per macroblock");
    check(words_stored < NMB * 24 * 4, "the picture takes fewer words than uncompressed");
    check(n_raw > 0, "raw segments occurred");
    // ---------------- read it back ----------------
    @(negedge clk);
    t1 = cyc;
    words_read = 0;
    for (int mb = 0; mb < NMB; mb++)
      for (int b = 0; b < 24; b++) begin
        int plane, ox, oy, nrow;
        blk_org(mb, b, plane, ox, oy);
        rd_valid = 1; rd_image = 1; rd_direct = 1; rd_addr = 20'((mb << 5) | b);
        @(posedge clk);
        while (!rd_ready) @(posedge clk);
        @(negedge clk);
        rd_valid = 0;
        nrow = 0;
        while (nrow < 4) begin
          @(posedge clk);
          if (rdata_valid) begin
            check(rdata == row_of(plane, ox, oy + nrow),
                  $sformatf("MB %0d block %0d row %0d: %h", mb, b, nrow, rdata));
            nrow++;
          end
        end
        @(negedge clk);
      end
    t_rd = cyc - t1;
    $display("picture read in %0d cycles, %0.1f per macroblock; %0d words read of %0d",
             t_rd, real'(t_rd) / NMB, words_read, NMB * 24 * 4);
    check(words_read <= words_stored + NMB * 24, "at most one word beyond each segment read");
    // one single-block request after another: 20 decoder cycles plus 4
    check(t_rd <= NMB * 24 * 24, "at most 24 cycles per block read on its own");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
