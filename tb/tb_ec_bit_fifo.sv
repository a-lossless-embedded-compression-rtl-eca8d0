// tb_ec_bit_fifo: self-checking testbench of the decoder's bit buffer.
//
// Random 32-bit words are offered at random and random numbers of bits
// (never more than are held) are consumed; now and then the buffer is
// flushed. A bit queue in the testbench models the expected contents: each
// cycle buf_size must equal the queue length and the valid bits of window
// must equal the head of the queue, MSB first. The buffer must refuse a
// word while fewer than 32 free bits would remain, which must happen.
module tb_ec_bit_fifo;

  localparam int NCYC = 4000;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready, flush = 0;
  logic [31:0] in_data = '0;
  logic [6:0]  consume = '0, buf_size;
  logic [63:0] window;

  ec_bit_fifo dut (.*);

  int checks = 0, failures = 0, cyc = 0, n_full = 0, n_flush = 0;
  bit q[$];

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
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < NCYC; c++) begin
      bit ok;
      @(negedge clk);
      // compare the visible state with the model
      check(int'(buf_size) == q.size(), $sformatf("cycle %0d size %0d expected %0d", c, buf_size, q.size()));
      ok = 1;
      for (int i = 0; i < q.size() && i < 64; i++) ok &= (window[63 - i] == q[i]);
      check(ok, $sformatf("cycle %0d window %h", c, window));
      // next inputs
      in_valid = ($urandom_range(0, 2) != 0);
      in_data  = $urandom;
      flush    = ($urandom_range(0, 60) == 0);
      consume  = flush ? 7'd0 : 7'($urandom_range(0, (q.size() < 40) ? q.size() : 40));
      #1;
      if (in_valid && !in_ready) n_full++;
      if (flush) n_flush++;
      // model update at the coming edge
      if (flush) q.delete();
      else repeat (int'(consume)) void'(q.pop_front());
      if (in_valid && in_ready)
        for (int b = 31; b >= 0; b--) q.push_back(in_data[b]);
    end
    check(n_full > 0, "a word was refused while the buffer was full");
    check(n_flush > 0, "a flush occurred");
    $display("refused %0d flushes %0d", n_full, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
