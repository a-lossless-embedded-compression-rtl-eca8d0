// tb_ec_pkg: self-checking testbench of the shared package's functions.
//
// Checks every input of the small functions against formulas written out
// here: the four scan orders against the reference tables (and that each is
// a permutation of the 16 pixels), the third scan mode for all 16 intra
// codes, the Rice mapping and its inverse for every difference -255..255,
// |d|, the k rule (smallest k <= 6 with 16 * 2^k >= A) for every sum up to
// 8191 and the Golomb-Rice length for every value and k. Pure functions, so
// the clock only paces the watchdog.
module tb_ec_pkg;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  logic clk = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int modes[4] = '{0, 1, 3, 4};
    blk_t b;
    for (int m = 0; m < 4; m++) begin
      bit [15:0] seen;
      seen = '0;
      for (int j = 0; j < 16; j++) begin
        int p;
        p = int'(scan_pos(scan_t'(m), 4'(j)));
        check(p == scan_tab(modes[m], j), $sformatf("scan mode %0d position %0d: %0d", modes[m], j, p));
        seen[p] = 1'b1;
      end
      check(seen == 16'hffff, $sformatf("scan mode %0d visits every pixel", modes[m]));
    end
    for (int i = 0; i < 16; i++)
      check(third_mode(4'(i)) == ((i == 0 || i == 4 || i == 5 || i == 6) ? SCAN4 : SCAN3),
            $sformatf("third scan mode for intra %0d", i));
    for (int d = -255; d <= 255; d++) begin
      map_t v;
      v = rice_map(9'(d));
      check(int'(v) == ((d >= 0) ? 2 * d : -2 * d - 1), $sformatf("map of %0d: %0d", d, v));
      check(rice_unmap(v) == 9'(d), $sformatf("unmap of %0d", v));
      check(int'(abs_diff(9'(d))) == ((d < 0) ? -d : d), $sformatf("|%0d|", d));
    end
    for (int a = 0; a < 8192; a++) begin
      int k;
      k = 0;
      while ((16 << k) < a && k < 6) k++;
      check(int'(k_of_sum(13'(a))) == k, $sformatf("k for sum %0d: %0d expected %0d", a, k_of_sum(13'(a)), k));
    end
    for (int k = 0; k <= 6; k++)
      for (int v = 0; v < 512; v++)
        check(int'(gr_len(9'(v), 3'(k))) == 1 + k + (v >> k), $sformatf("length of %0d with k %0d", v, k));
    for (int i = 0; i < 16; i++) b[127 - 8 * i -: 8] = 8'(13 * i + 3);
    for (int i = 0; i < 16; i++)
      check(int'(get_pix(b, 4'(i))) == 13 * i + 3, $sformatf("pixel %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
