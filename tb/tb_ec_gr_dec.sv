// tb_ec_gr_dec: self-checking testbench of the Golomb-Rice decoder.
//
// Segments of the worked example and of pseudo-random blocks are coded by
// the reference model, stored one per 5-word slot with random garbage after
// the segment, and streamed through a bit buffer into the decoder, which
// is enabled at random. Each decoded symbol is compared with the reference:
// the header (tag, scan mode, k, first pixel) at index 0, then the 15
// Rice-mapped values or raw pixels, each with its code length. After the
// 16th symbol (seg_done) the buffer is flushed and the next slot starts;
// the padding and garbage must never reach the decoder as symbols.
module tb_ec_gr_dec;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  localparam int NBLK = 60;

  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready, enable = 0;
  logic [31:0] in_data;
  logic [63:0] window;
  logic [6:0]  buf_size, sym_len;
  logic        sym_valid, seg_done, tag;
  logic [3:0]  sym_idx;
  map_t        sym_value;
  scan_t       mode;
  k_t          k;
  pix_t        first;

  ec_bit_fifo u_fifo (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                      .consume(sym_len), .flush(seg_done), .window, .buf_size);
  ec_gr_dec dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int px_all[NBLK][16];
  int intra_all[NBLK];
  int unsigned slot[NBLK][5];
  int cur = 0, widx = 0, nsym = 0, n_idle = 0, n_raw = 0, n_cmp = 0;

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
      int nb, tg, md, kk;
      if (b == 0) px_all[0] = ex; else make_block(b % 5, px_all[b]);
      intra_all[b] = (b == 0) ? 1 : $urandom_range(0, 8);
      ref_encode(px_all[b], intra_all[b], w, nb, tg, md, kk);
      for (int i = 0; i < 5; i++) slot[b][i] = (i < w.size()) ? w[i] : $urandom;
    end
  end

  assign in_valid = rst_n && cur < NBLK && widx < 5;
  assign in_data  = (cur < NBLK && widx < 5) ? slot[cur][widx] : 32'h0;

  always @(posedge clk) if (rst_n) begin
    if (seg_done) begin
      cur  <= cur + 1;
      widx <= 0;
    end else if (in_valid && in_ready) begin
      widx <= widx + 1;
    end
    if (!enable) n_idle++;
    enable <= (cur < NBLK / 2) ? ($urandom_range(0, 2) != 0) : 1'b1;
    if (sym_valid) begin
      int unsigned w[$];
      int nb, tg, md, kk, j;
      int mp[15];
      int k2;
      ref_encode(px_all[cur], intra_all[cur], w, nb, tg, md, kk);
      ref_maps(px_all[cur], md, mp, k2);
      j = nsym % 16;
      check(int'(sym_idx) == j, $sformatf("block %0d symbol index %0d expected %0d", cur, sym_idx, j));
      check(tag == 1'(tg), $sformatf("block %0d symbol %0d tag", cur, j));
      if (j == 0) begin
        if (tg) n_cmp++; else n_raw++;
        check(first == 8'(px_all[cur][tg ? scan_tab(md, 0) : 0]), $sformatf("block %0d first pixel", cur));
        check(int'(sym_len) == (tg ? 14 : 9), $sformatf("block %0d header length", cur));
        if (tg) check(mode == scan_t'(mode_code(md)) && k == 3'(kk),
                      $sformatf("block %0d mode %0d k %0d", cur, mode, k));
      end else if (tg) begin
        check(int'(sym_value) == mp[j-1], $sformatf("block %0d value %0d: %0d expected %0d",
                                                     cur, j, sym_value, mp[j-1]));
        check(int'(sym_len) == 1 + kk + (mp[j-1] >> kk), $sformatf("block %0d length %0d", cur, j));
      end else begin
        check(int'(sym_value) == px_all[cur][j], $sformatf("block %0d raw pixel %0d", cur, j));
        check(int'(sym_len) == 8, $sformatf("block %0d raw length", cur));
      end
      check(seg_done == (j == 15), $sformatf("block %0d seg_done at %0d", cur, j));
      nsym++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (cur == NBLK);
    repeat (3) @(posedge clk);
    check(nsym == 16 * NBLK, $sformatf("%0d symbols", nsym));
    check(n_raw > 0 && n_cmp > 0 && n_idle > 0, "raw and compressed segments, decoder held off");
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
