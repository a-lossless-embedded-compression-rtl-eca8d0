// tb_ec_encoder: self-checking testbench of the EC encoder.
//
// Sends the document's worked example block and then pseudo-random blocks
// (smooth, striped and noisy, random intra modes) back to back, and
// compares every output word and segment length with the reference model.
// Checks the worked example's bit string, that both compressed and raw
// segments occur, the 52-cycle latency of the first block and the 420-cycle
// time of a 24-block macroblock (up to 2 cycles later when words queue).
module tb_ec_encoder;
  import ec_ref_pkg::*;

  localparam int NBLK = 48;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready;
  logic [31:0] in_row = '0;
  logic [3:0]  in_intra = '0;
  logic        out_valid, out_last;
  logic [31:0] out_data;
  logic [2:0]  out_words;

  int checks = 0, failures = 0;
  int cyc = 0;
  int px_all[NBLK][16];
  int intra_all[NBLK];
  int t_first = -1;
  int t_last[$];
  int unsigned got[$];
  int nseg = 0, n_raw = 0, n_cmp = 0;

  ec_encoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // The example block of the document (scan mode 1, k = 1, 59 bits).
  initial begin
    int ex[16] = '{48, 51, 48, 48, 48, 48, 49, 49, 45, 45, 46, 46, 41, 42, 44, 42};
    px_all[0] = ex;
    intra_all[0] = 1;
    for (int b = 1; b < NBLK; b++) begin
      make_block(b % 5, px_all[b]);
      intra_all[b] = $urandom_range(0, 8);
    end
  end

  // Driver: rows back to back.
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      for (int r = 0; r < 4; r++) begin
        in_valid <= 1;
        in_row   <= row_word(px_all[b], r);
        in_intra <= 4'(intra_all[b]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (t_first < 0) t_first = cyc;
        @(negedge clk);
      end
    end
    in_valid <= 0;
  end

  // Monitor and comparison.
  always @(posedge clk) if (rst_n && out_valid) begin
    got.push_back(out_data);
    if (out_last) begin
      int unsigned exp_w[$];
      int nbits, tg, md, kk;
      t_last.push_back(cyc);
      ref_encode(px_all[nseg], intra_all[nseg], exp_w, nbits, tg, md, kk);
      if (tg) n_cmp++; else n_raw++;
      check(got.size() == exp_w.size() && int'(out_words) == exp_w.size(),
            $sformatf("block %0d: %0d words (out_words %0d), expected %0d",
                      nseg, got.size(), out_words, exp_w.size()));
      for (int i = 0; i < exp_w.size() && i < got.size(); i++)
        check(got[i] == exp_w[i], $sformatf("block %0d word %0d: %h expected %h",
                                            nseg, i, got[i], exp_w[i]));
      if (nseg == 0) begin
        // bit string of the worked example, taken from the document's table
        string s = {"1", "01", "001", "00110000", "00010", "0011", "10", "010", "10",
                    "11", "10", "0011", "10", "010", "10", "00011", "0010", "011", "11"};
        bit ok;
        ok = (s.len() == 59) && (nbits == 59);
        for (int i = 0; i < s.len(); i++)
          if (got.size() > i / 32)
            ok &= (((got[i/32] >> (31 - i % 32)) & 1) == ((s[i] == "1") ? 1 : 0));
        check(ok, $sformatf("worked example bit string (nbits %0d mode %0d k %0d, %h %h)", nbits, md, kk, got[0], got[1]));
      end
      got.delete();
      nseg++;
    end
  end

  initial begin
    wait (nseg == NBLK);
    repeat (5) @(posedge clk);
    check(t_last[0] - t_first == 52,
          $sformatf("first block latency %0d, expected 52", t_last[0] - t_first));
    // A segment's last word may trail its 16th code by up to two cycles
    // when earlier words are still queued; the rate stays one block per 16.
    check(t_last[23] - t_first >= 420 && t_last[23] - t_first <= 422,
          $sformatf("24 blocks in %0d cycles, expected 420..422", t_last[23] - t_first));
    for (int b = 1; b < NBLK; b++)
      check(t_last[b] - t_first - 52 - 16 * b inside {[0:2]},
            $sformatf("block %0d ends at %0d", b, t_last[b] - t_first));
    check(n_raw > 0, "a raw segment occurred");
    check(n_cmp > 0, "a compressed segment occurred");
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
