// tb_ec_addr_unit: self-checking testbench of the address unit, at the
// default 1920x1088 frame size.
//
// First the de-blocking filter side writes block 0 of every macroblock
// (which fills the translation buffer), mixed with other block addresses;
// every physical address is compared with (MB * 24 + block) * 5, on the
// write port and on the read port. Then
// motion compensation requests with random macroblocks (edges included),
// blocks, motion vectors and sub-pel flags are issued. For each the list of
// blocks that the 4x4 or 9x9 window covers is worked out here: row by row,
// clamped to the picture. Every block's coordinates, physical address and
// last flag are compared, under random back-pressure. 2x2 and 3x3 windows
// and clamping at all four picture edges must occur.
module tb_ec_addr_unit;

  localparam int MB_W = 120, MB_H = 68, NREQ = 400;

  logic        clk = 0, rst_n = 0;
  logic        df_map = 0;
  logic [19:0] df_addr = '0, df_phys, dr_addr = '0, dr_phys;
  logic        req_valid = 0, req_ready, sub_pel = 0;
  logic [6:0]  mb_x = '0, mb_y = '0;
  logic [4:0]  blk = '0;
  logic signed [9:0] mv_x = '0, mv_y = '0;
  logic        blk_valid, blk_ready = 0, blk_last;
  logic [19:0] blk_phys;
  logic [8:0]  blk_bx, blk_by;

  ec_addr_unit dut (.*);

  int checks = 0, failures = 0;
  int n_win4 = 0, n_win9 = 0, n_lo = 0, n_hi = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic int fdiv4(input int v);
    return (v < 0) ? -((3 - v) / 4) : v / 4;
  endfunction

  function automatic int clip(input int v, input int hi);
    return (v < 0) ? 0 : (v > hi) ? hi : v;
  endfunction

  task automatic request(input int mx, input int my, input int b, input int vx, input int vy,
                         input bit sp);
    int luma, ox, oy, nbx, nby, x0, y0, x1, y1, bx0, bx1, by0, by1, n;
    luma = (b < 16);
    ox = luma ? 4 * (((b >> 2) & 1) * 2 + (b & 1)) : 4 * (b & 1);
    oy = luma ? 4 * (((b >> 3) & 1) * 2 + ((b >> 1) & 1)) : 4 * ((b >> 1) & 1);
    nbx = luma ? 4 * MB_W : 2 * MB_W;
    nby = luma ? 4 * MB_H : 2 * MB_H;
    x0 = (luma ? 16 : 8) * mx + ox + vx - (sp ? 2 : 0);
    y0 = (luma ? 16 : 8) * my + oy + vy - (sp ? 2 : 0);
    x1 = x0 + (sp ? 8 : 3);
    y1 = y0 + (sp ? 8 : 3);
    if (x0 < 0 || y0 < 0) n_lo++;
    if (x1 >= 4 * nbx || y1 >= 4 * nby) n_hi++;
    bx0 = clip(fdiv4(x0), nbx - 1); bx1 = clip(fdiv4(x1), nbx - 1);
    by0 = clip(fdiv4(y0), nby - 1); by1 = clip(fdiv4(y1), nby - 1);
    if ((bx1 - bx0 + 1) * (by1 - by0 + 1) == 4) n_win4++;
    if ((bx1 - bx0 + 1) * (by1 - by0 + 1) == 9) n_win9++;
    @(negedge clk);
    req_valid = 1; mb_x = 7'(mx); mb_y = 7'(my); blk = 5'(b);
    mv_x = 10'(vx); mv_y = 10'(vy); sub_pel = sp;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
    n = 0;
    for (int by = by0; by <= by1; by++)
      for (int bx = bx0; bx <= bx1; bx++) begin
        int emb, eblk, ephys;
        if (luma) begin
          emb  = (by / 4) * MB_W + bx / 4;
          eblk = ((by >> 1) & 1) * 8 + ((bx >> 1) & 1) * 4 + (by & 1) * 2 + (bx & 1);
        end else begin
          emb  = (by / 2) * MB_W + bx / 2;
          eblk = ((b < 20) ? 16 : 20) + (by & 1) * 2 + (bx & 1);
        end
        ephys = (emb * 24 + eblk) * 5;
        blk_ready = ($urandom_range(0, 2) != 0);
        while (!blk_ready) begin
          check(blk_valid, "block held while not taken");
          @(negedge clk);
          blk_ready = ($urandom_range(0, 2) != 0);
        end
        check(blk_valid && int'(blk_bx) == bx && int'(blk_by) == by,
              $sformatf("request mb(%0d,%0d) blk %0d mv(%0d,%0d) sp %0d: block (%0d,%0d) expected (%0d,%0d)",
                        mx, my, b, vx, vy, sp, blk_bx, blk_by, bx, by));
        check(int'(blk_phys) == ephys, $sformatf("block (%0d,%0d) address %0d expected %0d",
                                                 bx, by, blk_phys, ephys));
        check(blk_last == (bx == bx1 && by == by1), "last flag");
        @(negedge clk);
        blk_ready = 0;
      end
    check(!blk_valid, "no block after the last");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // de-blocking filter writes
    for (int mb = 0; mb < MB_W * MB_H; mb++) begin
      int b;
      b = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 23) : 0;
      @(negedge clk);
      df_map = 1;
      df_addr = 20'((mb << 5) | b);
      dr_addr = 20'((mb << 5) | (23 - b));
      #1;
      check(int'(dr_phys) == (mb * 24 + 23 - b) * 5, $sformatf("direct mapping (read port) of MB %0d", mb));
      check(int'(df_phys) == (mb * 24 + b) * 5, $sformatf("direct mapping of MB %0d block %0d", mb, b));
      if (b != 0) begin
        @(negedge clk);
        df_addr = 20'(mb << 5);
      end
    end
    @(negedge clk);
    df_map = 0;
    // motion compensation reads
    request(0, 0, 0, -5, -7, 1);
    request(MB_W - 1, MB_H - 1, 15, 6, 5, 1);
    request(MB_W - 1, MB_H - 1, 23, 9, 9, 0);
    request(10, 10, 0, 1, 1, 0);
    request(10, 10, 0, 0, 0, 0);
    for (int i = 0; i < NREQ; i++) begin
      int side, mx, my;
      side = $urandom_range(0, 3);
      mx = (side == 0) ? 0 : (side == 1) ? MB_W - 1 : $urandom_range(0, MB_W - 1);
      my = (side == 0) ? 0 : (side == 1) ? MB_H - 1 : $urandom_range(0, MB_H - 1);
      request(mx, my, $urandom_range(0, 23), $urandom_range(0, 32) - 16,
              $urandom_range(0, 32) - 16, $urandom_range(0, 1));
    end
    check(n_win4 > 0 && n_win9 > 0, "2x2 and 3x3 windows occurred");
    check(n_lo > 0 && n_hi > 0, "windows left the picture on both sides");
    $display("2x2 %0d 3x3 %0d low-side clamps %0d high-side clamps %0d", n_win4, n_win9, n_lo, n_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
