// tb_ec_gr_pack: self-checking testbench of the Golomb-Rice coder and packer.
//
// Segment bundles (the worked example, then pseudo-random blocks giving
// compressed and raw segments) are built here from the reference model and
// offered back to back. Every output word, out_last and out_words are
// compared with the reference encoder's padded bit stream, and the worked
// example must give its 59-bit segment (first word a4c0472b). The packer
// takes one bundle per 16 cycles; the last word of a segment may trail by
// up to two cycles while earlier words are still queued.
module tb_ec_gr_pack;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  localparam int NBLK = 50;

  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready, out_valid, out_last;
  seg_t        in;
  logic [31:0] out_data;
  logic [2:0]  out_words;

  ec_gr_pack dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int px_all[NBLK][16];
  int intra_all[NBLK];
  int cur = 0, nout = 0, n_raw = 0, n_cmp = 0, t_first = -1;
  int t_last[$];
  int unsigned got[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic seg_t bundle(input int b);
    seg_t x;
    int unsigned w[$];
    int nb, tg, md, kk;
    int mp[15];
    int k2;
    ref_encode(px_all[b], intra_all[b], w, nb, tg, md, kk);
    ref_maps(px_all[b], md, mp, k2);
    x.tag   = 1'(tg);
    x.mode  = scan_t'(mode_code(md));
    x.k     = 3'(kk);
    x.first = tg ? 8'(px_all[b][scan_tab(md, 0)]) : 8'(px_all[b][0]);
    for (int j = 0; j < 15; j++) x.maps[j] = 9'(mp[j]);
    for (int i = 0; i < 16; i++) x.pixels[127 - 8 * i -: 8] = 8'(px_all[b][i]);
    x.bits = 13'(nb);
    return x;
  endfunction

  initial begin
    int ex[16] = '{48, 51, 48, 48, 48, 48, 49, 49, 45, 45, 46, 46, 41, 42, 44, 42};
    px_all[0] = ex;
    intra_all[0] = 1;
    for (int b = 1; b < NBLK; b++) begin
      make_block(b % 5, px_all[b]);
      intra_all[b] = $urandom_range(0, 8);
    end
  end

  assign in_valid = rst_n && cur < NBLK;
  assign in = bundle((cur < NBLK) ? cur : 0);

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      if (t_first < 0) t_first = cyc;
      cur <= cur + 1;
    end
    if (out_valid) begin
      got.push_back(out_data);
      if (out_last) begin
        int unsigned w[$];
        int nb, tg, md, kk;
        ref_encode(px_all[nout], intra_all[nout], w, nb, tg, md, kk);
        if (tg) n_cmp++; else n_raw++;
        check(got.size() == w.size() && int'(out_words) == w.size(),
              $sformatf("segment %0d: %0d words, out_words %0d, expected %0d",
                        nout, got.size(), out_words, w.size()));
        for (int i = 0; i < w.size() && i < got.size(); i++)
          check(got[i] == w[i], $sformatf("segment %0d word %0d: %h expected %h", nout, i, got[i], w[i]));
        if (nout == 0) check(got[0] == 32'ha4c0472b && got.size() == 2, "worked example words");
        got.delete();
        t_last.push_back(cyc);
        nout++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (nout == NBLK);
    repeat (3) @(posedge clk);
    for (int b = 0; b < NBLK; b++)
      check(t_last[b] - t_first - 16 * (b + 1) inside {[0:2]},
            $sformatf("segment %0d ends at %0d", b, t_last[b] - t_first));
    check(n_raw > 0 && n_cmp > 0, "both segment kinds occurred");
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
