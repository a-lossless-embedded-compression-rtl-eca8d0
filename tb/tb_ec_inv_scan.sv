// tb_ec_inv_scan: self-checking testbench of the inverse scan stage.
//
// Symbol streams (header, then 15 Rice-mapped values or raw pixels) are
// worked out here with the reference model for the worked example and for
// pseudo-random blocks in all four scan modes, and are driven with random
// gaps, never while the stage reports busy. The stage must rebuild the
// block and send its four rows, top row first, on four consecutive cycles,
// the first one two clock edges after the 16th symbol is taken, with
// out_last on the fourth.
module tb_ec_inv_scan;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  localparam int NBLK = 60;

  logic        clk = 0, rst_n = 0;
  logic        sym_valid = 0, tag = 0, busy, out_valid, out_last;
  logic [3:0]  sym_idx = '0;
  map_t        sym_value = '0;
  scan_t       mode = SCAN0;
  pix_t        first = '0;
  logic [31:0] out_row;

  ec_inv_scan dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int px_all[NBLK][16];
  int intra_all[NBLK];
  int nblk = 0, nrow = 0, t_sym15 = 0, n_raw = 0, n_mode4 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int ex[16] = '{48, 51, 48, 48, 48, 48, 49, 49, 45, 45, 46, 46, 41, 42, 44, 42};
    for (int b = 0; b < NBLK; b++) begin
      if (b == 0) px_all[0] = ex; else make_block(b % 5, px_all[b]);
      intra_all[b] = (b == 0) ? 1 : $urandom_range(0, 8);
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int unsigned e;
    e = row_word(px_all[nblk], nrow);
    check(out_row == e, $sformatf("block %0d row %0d: %h expected %h", nblk, nrow, out_row, e));
    check(out_last == (nrow == 3), "out_last on the fourth row");
    check(cyc - t_sym15 == nrow + 2, $sformatf("block %0d row %0d at +%0d", nblk, nrow, cyc - t_sym15));
    if (nrow == 3) begin
      nrow = 0;
      nblk++;
    end else nrow++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NBLK; b++) begin
      int unsigned w[$];
      int nb, tg, md, kk, k2;
      int mp[15];
      ref_encode(px_all[b], intra_all[b], w, nb, tg, md, kk);
      ref_maps(px_all[b], md, mp, k2);
      if (!tg) n_raw++;
      if (tg && md == 4) n_mode4++;
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        while (busy || $urandom_range(0, 3) == 0) begin
          sym_valid = 0;
          @(negedge clk);
        end
        sym_valid = 1;
        sym_idx   = 4'(j);
        tag       = 1'(tg);
        mode      = scan_t'(mode_code(md));
        first     = 8'(px_all[b][tg ? scan_tab(md, 0) : 0]);
        sym_value = (j == 0) ? map_t'(first) : tg ? 9'(mp[j-1]) : 9'(px_all[b][j]);
        @(posedge clk);
        if (j == 15) t_sym15 = cyc;
      end
      @(negedge clk);
      sym_valid = 0;
    end
    repeat (8) @(posedge clk);
    check(nblk == NBLK, $sformatf("%0d blocks out", nblk));
    check(n_raw > 0 && n_mode4 > 0, "raw blocks and scan mode 4 occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
