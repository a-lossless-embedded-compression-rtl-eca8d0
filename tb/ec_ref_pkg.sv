// ec_ref_pkg: behavioural reference model of the EC segment format, used by
// the testbenches to work out expected results independently of the RTL.
//
// ref_encode() codes one 4x4 block (raster order pixels) the way the
// algorithm is specified: three scan modes chosen by the intra mode,
// differences along each scan, k = smallest k <= 6 with 16*2^k >= sum|d|,
// Golomb-Rice lengths, shortest mode, raw segment when 13 + codes >= 128,
// then zero padding to whole 32-bit words. ref_maps() gives the Rice-mapped
// differences of one scan. All work on plain integers and bit queues, not on
// the RTL's packed structures.
package ec_ref_pkg;

  typedef bit bitq_t[$];

  function automatic int scan_tab(input int mode, input int j);
    int t0[16] = '{0, 4, 8, 12, 13, 9, 5, 1, 2, 6, 10, 14, 15, 11, 7, 3};
    int t1[16] = '{0, 1, 2, 3, 7, 6, 5, 4, 8, 9, 10, 11, 15, 14, 13, 12};
    int t3[16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};
    int t4[16] = '{3, 2, 7, 11, 6, 1, 0, 5, 10, 15, 14, 9, 4, 8, 13, 12};
    case (mode)
      0: return t0[j];
      1: return t1[j];
      3: return t3[j];
      default: return t4[j];
    endcase
  endfunction

  function automatic int mode_code(input int mode);
    case (mode)
      0: return 0;
      1: return 1;
      3: return 2;
      default: return 3;
    endcase
  endfunction

  function automatic void push_bits(ref bitq_t q, input int unsigned v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(bit'((v >> i) & 1));
  endfunction

  // Returns the padded words; nbits gets the unpadded segment length.
  function automatic void ref_encode(input int px[16], input int intra,
                                     output int unsigned words[$], output int nbits,
                                     output int tag_o, output int mode_o, output int k_o);
    int modes[3];
    int len[3], kk[3], maps[3][15];
    int best;
    bitq_t q;
    modes[0] = 0;
    modes[1] = 1;
    modes[2] = (intra == 0 || intra == 4 || intra == 5 || intra == 6) ? 4 : 3;
    for (int m = 0; m < 3; m++) begin
      int a = 0;
      int k = 0;
      for (int j = 1; j < 16; j++) begin
        int d = px[scan_tab(modes[m], j)] - px[scan_tab(modes[m], j - 1)];
        a += (d < 0) ? -d : d;
        maps[m][j-1] = (d >= 0) ? 2 * d : -2 * d - 1;
      end
      while ((16 << k) < a && k < 6) k++;
      kk[m] = k;
      len[m] = 0;
      for (int j = 0; j < 15; j++) len[m] += 1 + k + (maps[m][j] >> k);
    end
    best = 0;
    for (int m = 1; m < 3; m++) if (len[m] < len[best]) best = m;
    if (13 + len[best] < 128) begin
      int k = kk[best];
      tag_o = 1; mode_o = modes[best]; k_o = k;
      push_bits(q, 1, 1);
      push_bits(q, mode_code(modes[best]), 2);
      push_bits(q, k, 3);
      push_bits(q, px[scan_tab(modes[best], 0)], 8);
      for (int j = 0; j < 15; j++) begin
        int v = maps[best][j];
        repeat (v >> k) q.push_back(1'b0);
        q.push_back(1'b1);
        push_bits(q, v & ((1 << k) - 1), k);
      end
    end else begin
      tag_o = 0; mode_o = 0; k_o = 0;
      push_bits(q, 0, 1);
      for (int i = 0; i < 16; i++) push_bits(q, px[i], 8);
    end
    nbits = q.size();
    while (q.size() % 32 != 0) q.push_back(1'b0);
    words.delete();
    for (int w = 0; w < q.size() / 32; w++) begin
      int unsigned x = 0;
      for (int b = 0; b < 32; b++) x = (x << 1) | int'(q[32 * w + b]);
      words.push_back(x);
    end
  endfunction

  // Rice-mapped differences along one scan mode (0, 1, 3 or 4) and its k.
  function automatic void ref_maps(input int px[16], input int mode, output int m[15],
                                   output int k);
    int a = 0;
    for (int j = 1; j < 16; j++) begin
      int d = px[scan_tab(mode, j)] - px[scan_tab(mode, j - 1)];
      a += (d < 0) ? -d : d;
      m[j-1] = (d >= 0) ? 2 * d : -2 * d - 1;
    end
    k = 0;
    while ((16 << k) < a && k < 6) k++;
  endfunction

  // Pseudo-random test block: smooth (small steps), striped or noisy.
  function automatic void make_block(input int kind, output int px[16]);
    int base = $urandom_range(0, 255);
    for (int i = 0; i < 16; i++) begin
      int v;
      case (kind)
        0: v = base + $urandom_range(0, 4) - 2;
        1: v = base + ((i % 4) % 2 ? 20 : 0) + $urandom_range(0, 2);
        2: v = base + ((i / 4) % 2 ? 30 : 0) + $urandom_range(0, 2);
        3: v = $urandom_range(0, 255);
        default: v = base + $urandom_range(0, 24) - 12;
      endcase
      px[i] = (v < 0) ? 0 : (v > 255) ? 255 : v;
    end
  endfunction

  function automatic int unsigned row_word(input int px[16], input int r);
    return (32'(px[4*r]) << 24) | (32'(px[4*r+1]) << 16) |
           (32'(px[4*r+2]) << 8) | 32'(px[4*r+3]);
  endfunction

endpackage
