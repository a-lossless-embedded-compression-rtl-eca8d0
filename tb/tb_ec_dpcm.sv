// tb_ec_dpcm: self-checking testbench of the pixel-wise DPCM stage.
//
// Pseudo-random blocks with random intra modes (0..15) are offered as the
// catch buffer would offer them: held until the stage releases them. For
// each block the three scan modes, their first pixels, all 45 Rice-mapped
// differences and the three k values are compared with the reference
// model. The consumer first stalls at random (the stage must hold its
// result), then takes every result at once, when one block must come out
// every 16 cycles.
module tb_ec_dpcm;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  localparam int NBLK = 60;

  logic       clk = 0, rst_n = 0;
  logic       in_valid, in_release, out_valid, out_ready = 0;
  blk_t       in_blk;
  logic [3:0] in_intra;
  dpcm_out_t  out;

  ec_dpcm dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int px_all[NBLK][16];
  int intra_all[NBLK];
  int cur = 0, nout = 0, n_stall = 0;
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

  initial for (int b = 0; b < NBLK; b++) begin
    make_block(b % 5, px_all[b]);
    intra_all[b] = $urandom_range(0, 15);
  end

  always_comb begin
    in_blk = '0;
    for (int i = 0; i < 16; i++) in_blk[127 - 8 * i -: 8] = (cur < NBLK) ? 8'(px_all[cur][i]) : 8'h0;
  end
  assign in_valid = rst_n && cur < NBLK;
  assign in_intra = (cur < NBLK) ? 4'(intra_all[cur]) : 4'h0;

  always @(posedge clk) if (rst_n) begin
    if (in_release) cur <= cur + 1;
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      int modes[3];
      modes[0] = 0;
      modes[1] = 1;
      modes[2] = (intra_all[nout] inside {0, 4, 5, 6}) ? 4 : 3;
      for (int m = 0; m < 3; m++) begin
        int mp[15];
        int kk;
        ref_maps(px_all[nout], modes[m], mp, kk);
        check(out.mode[m] == scan_t'(mode_code(modes[m])),
              $sformatf("block %0d mode slot %0d: %0d", nout, m, out.mode[m]));
        check(out.first[m] == 8'(px_all[nout][scan_tab(modes[m], 0)]),
              $sformatf("block %0d mode %0d first pixel", nout, modes[m]));
        check(out.k[m] == 3'(kk), $sformatf("block %0d mode %0d k %0d expected %0d",
                                            nout, modes[m], out.k[m], kk));
        for (int j = 0; j < 15; j++)
          check(out.maps[m][j] == 9'(mp[j]), $sformatf("block %0d mode %0d value %0d: %0d expected %0d",
                                                       nout, modes[m], j, out.maps[m][j], mp[j]));
      end
      check(out.pixels == in_blk_of(nout), $sformatf("block %0d pixels", nout));
      t_out.push_back(cyc);
      nout++;
    end
    out_ready <= (nout < NBLK / 2) ? ($urandom_range(0, 3) == 0) : 1'b1;
  end

  function automatic blk_t in_blk_of(input int b);
    blk_t x;
    for (int i = 0; i < 16; i++) x[127 - 8 * i -: 8] = 8'(px_all[b][i]);
    return x;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (nout == NBLK);
    repeat (3) @(posedge clk);
    for (int b = NBLK / 2 + 2; b < NBLK; b++)
      check(t_out[b] - t_out[b-1] == 16, $sformatf("block %0d after %0d cycles, expected 16",
                                                   b, t_out[b] - t_out[b-1]));
    check(n_stall > 0, "the consumer stalled the stage");
    $display("stall cycles %0d", n_stall);
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
