// tb_ec_catch: self-checking testbench of the catch buffer.
//
// Rows of pseudo-random blocks are offered every cycle while the reader
// holds each block for a random time before releasing it. Every block seen
// on the read side is compared with the block that was written, including
// its intra mode, and the writer must be held back (in_ready low) while both
// buffers are full, which must happen at least once. With an immediate
// reader the buffer must take a row every cycle.
module tb_ec_catch;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  localparam int NBLK = 40;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready;
  logic [31:0] in_row = '0;
  logic [3:0]  in_intra = '0;
  logic        rd_valid, rd_release = 0;
  blk_t        rd_blk;
  logic [3:0]  rd_intra;

  ec_catch dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int px_all[NBLK][16];
  int intra_all[NBLK];
  int nrd = 0, n_full = 0;
  bit slow = 1;

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

  // writer
  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      if (b == NBLK / 2) begin
        in_valid <= 0;
        wait (nrd == NBLK / 2);
        slow = 0;
        @(negedge clk);
        t0 = cyc;
      end
      for (int r = 0; r < 4; r++) begin
        in_valid <= 1;
        in_row   <= row_word(px_all[b], r);
        in_intra <= (r == 0) ? 4'(intra_all[b]) : 4'($urandom_range(0, 15));
        @(posedge clk);
        while (!in_ready) begin
          n_full++;
          @(posedge clk);
        end
        @(negedge clk);
      end
    end
    in_valid <= 0;
    check(cyc - t0 == 4 * (NBLK / 2), $sformatf("%0d rows in %0d cycles with a fast reader",
                                                4 * (NBLK / 2), cyc - t0));
  end

  // reader
  always @(posedge clk) if (rst_n) begin
    rd_release <= 0;
    if (rd_valid && !rd_release) begin
      if (!slow || $urandom_range(0, 7) == 0) begin
        blk_t e;
        for (int i = 0; i < 16; i++) e[127 - 8 * i -: 8] = 8'(px_all[nrd][i]);
        check(rd_blk == e, $sformatf("block %0d: %h expected %h", nrd, rd_blk, e));
        check(rd_intra == 4'(intra_all[nrd]), $sformatf("block %0d intra", nrd));
        rd_release <= 1;
        nrd++;
      end
    end
  end

  initial begin
    wait (nrd == NBLK);
    repeat (5) @(posedge clk);
    check(n_full > 0, "writer was held back while both buffers were full");
    check(!rd_valid, "no block left after the last one");
    $display("held back %0d cycles", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
