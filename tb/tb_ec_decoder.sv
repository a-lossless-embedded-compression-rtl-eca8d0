// tb_ec_decoder: self-checking testbench of the EC decoder.
//
// Blocks (smooth, striped, noisy) are coded by the reference model and
// stored one segment per 5-word slot; unused slot words hold random
// garbage, which the decoder must drop. A word source feeds the current
// slot's words whenever the decoder is ready and moves to the next slot on
// seg_end. Every decoded row is compared with the original block, both
// segment kinds must occur, and blocks must come out one per 20 cycles.
module tb_ec_decoder;
  import ec_ref_pkg::*;

  localparam int NBLK = 60;

  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready;
  logic [31:0] in_data;
  logic        seg_end, out_valid, out_last;
  logic [31:0] out_row;

  int checks = 0, failures = 0;
  int cyc = 0;
  int px_all[NBLK][16];
  int unsigned slot[NBLK][5];
  int tag_all[NBLK];
  int cur = 0, widx = 0, nblk_out = 0, nrow = 0;
  int t_done[$];
  int n_raw = 0, n_cmp = 0;

  ec_decoder dut (.*);

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
      int unsigned w[$];
      int nb, md, kk;
      if (b == 0) px_all[0] = ex; else make_block(b % 5, px_all[b]);
      ref_encode(px_all[b], $urandom_range(0, 8), w, nb, tag_all[b], md, kk);
      if (tag_all[b] != 0) n_cmp++; else n_raw++;
      for (int i = 0; i < 5; i++) slot[b][i] = (i < w.size()) ? w[i] : $urandom;
    end
  end

  // word source: current slot, word by word
  assign in_valid = rst_n && (cur < NBLK) && (widx < 5);
  assign in_data  = (cur < NBLK && widx < 5) ? slot[cur][widx] : 32'h0;

  always @(posedge clk) if (rst_n) begin
    if (seg_end) begin
      cur  <= cur + 1;
      widx <= 0;
    end else if (in_valid && in_ready) begin
      widx <= widx + 1;
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int unsigned e;
    e = row_word(px_all[nblk_out], nrow);
    check(out_row == e, $sformatf("block %0d row %0d: %h expected %h", nblk_out, nrow, out_row, e));
    check(out_last == (nrow == 3), "out_last position");
    if (nrow == 3) begin
      nrow = 0;
      nblk_out++;
      t_done.push_back(cyc);
    end else begin
      nrow++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (nblk_out == NBLK);
    repeat (3) @(posedge clk);
    for (int b = 2; b < NBLK; b++)
      check(t_done[b] - t_done[b-1] == 20,
            $sformatf("block %0d spacing %0d, expected 20", b, t_done[b] - t_done[b-1]));
    check(t_done[25] - t_done[1] == 480, "24 blocks in 480 cycles");
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
