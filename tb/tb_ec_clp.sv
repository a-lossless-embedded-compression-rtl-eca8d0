// tb_ec_clp: self-checking testbench of the code length predictor.
//
// The DPCM results of pseudo-random blocks (including the worked example of
// the segment format) are built here from the reference model and offered
// to the predictor. Each decision is compared with the reference encoder:
// compressed or raw, chosen scan mode, k, first pixel, segment length in
// bits and the chosen mode's values. A flat block, where all three modes
// tie, is included. Random back-pressure on the output is
// applied first; afterwards a decision must come out every 16 cycles.
module tb_ec_clp;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  localparam int NBLK = 60;

  logic      clk = 0, rst_n = 0;
  logic      in_valid, in_ready, out_valid, out_ready = 0;
  dpcm_out_t in;
  seg_t      out;

  ec_clp dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int px_all[NBLK][16];
  int intra_all[NBLK];
  int cur = 0, nout = 0, n_raw = 0, n_cmp = 0;
  int t_out[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic dpcm_out_t bundle(input int b);
    dpcm_out_t x;
    int modes[3];
    modes[0] = 0;
    modes[1] = 1;
    modes[2] = (intra_all[b] inside {0, 4, 5, 6}) ? 4 : 3;
    for (int m = 0; m < 3; m++) begin
      int mp[15];
      int kk;
      ref_maps(px_all[b], modes[m], mp, kk);
      x.mode[m]  = scan_t'(mode_code(modes[m]));
      x.k[m]     = 3'(kk);
      x.first[m] = 8'(px_all[b][scan_tab(modes[m], 0)]);
      for (int j = 0; j < 15; j++) x.maps[m][j] = 9'(mp[j]);
    end
    for (int i = 0; i < 16; i++) x.pixels[127 - 8 * i -: 8] = 8'(px_all[b][i]);
    return x;
  endfunction

  initial begin
    int ex[16] = '{48, 51, 48, 48, 48, 48, 49, 49, 45, 45, 46, 46, 41, 42, 44, 42};
    int flat[16] = '{10, 10, 10, 10, 10, 10, 10, 10, 10, 10, 10, 10, 10, 10, 10, 10};
    px_all[0] = ex;   intra_all[0] = 1;
    px_all[1] = flat; intra_all[1] = 2;     // all modes tie: mode 0 must win
    for (int b = 2; b < NBLK; b++) begin
      make_block(b % 5, px_all[b]);
      intra_all[b] = $urandom_range(0, 8);
    end
  end

  assign in_valid = rst_n && cur < NBLK;
  assign in = bundle((cur < NBLK) ? cur : 0);

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) cur <= cur + 1;
    if (out_valid && out_ready) begin
      int unsigned w[$];
      int nb, tg, md, kk;
      ref_encode(px_all[nout], intra_all[nout], w, nb, tg, md, kk);
      if (tg) n_cmp++; else n_raw++;
      check(out.tag == 1'(tg), $sformatf("block %0d tag %0d expected %0d", nout, out.tag, tg));
      check(int'(out.bits) == nb, $sformatf("block %0d bits %0d expected %0d", nout, out.bits, nb));
      if (tg) begin
        int mp[15];
        int k2;
        ref_maps(px_all[nout], md, mp, k2);
        check(out.mode == scan_t'(mode_code(md)), $sformatf("block %0d mode", nout));
        check(out.k == 3'(kk), $sformatf("block %0d k", nout));
        check(out.first == 8'(px_all[nout][scan_tab(md, 0)]), $sformatf("block %0d first", nout));
        for (int j = 0; j < 15; j++)
          check(out.maps[j] == 9'(mp[j]), $sformatf("block %0d value %0d", nout, j));
      end else begin
        check(out.pixels == bundle(nout).pixels, $sformatf("block %0d raw pixels", nout));
      end
      if (nout == 0) check(out.tag && out.mode == SCAN1 && out.k == 3'd1 && out.bits == 13'd59,
                           "worked example: mode 1, k 1, 59 bits");
      if (nout == 1) check(out.mode == SCAN0, "a tie goes to the first mode");
      t_out.push_back(cyc);
      nout++;
    end
    out_ready <= (nout < NBLK / 2) ? ($urandom_range(0, 3) == 0) : 1'b1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (nout == NBLK);
    repeat (3) @(posedge clk);
    for (int b = NBLK / 2 + 2; b < NBLK; b++)
      check(t_out[b] - t_out[b-1] == 16, $sformatf("block %0d after %0d cycles, expected 16",
                                                   b, t_out[b] - t_out[b-1]));
    check(n_raw > 0 && n_cmp > 0, "both decisions occurred");
    $display("raw %0d compressed %0d", n_raw, n_cmp);
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
