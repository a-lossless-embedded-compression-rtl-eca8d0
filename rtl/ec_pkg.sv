// ec_pkg: types, constants and small functions shared by the lossless
// embedded compression (EC) encoder, decoder and memory controller.
//
// A 4x4 block is held as 128 bits, pixel P(r,c) (raster index p = 4r+c) at
// bits [127-8p -: 8], so row r is the 32-bit word [127-32r -: 32] with the
// left pixel in its top byte. This byte order is this design's choice.
//
// Scan modes (scan_mode field, 2 bits): 0 = scan_mode_0 (vertical snake),
// 1 = scan_mode_1 (horizontal snake), 2 = scan_mode_3 (diagonal zig-zag along
// the down-left direction), 3 = scan_mode_4 (mirror image of scan_mode_3).
// The intra 4x4 prediction mode of the block selects scan_mode_0,
// scan_mode_1 and one of scan_mode_3 / scan_mode_4 (intra 1,2,3,7,8 ->
// scan_mode_3; intra 0,4,5,6 -> scan_mode_4), as in the document's mode
// decision table. The exact pixel order of each scan is read from drawings.
//
// Rice mapping turns a 9-bit DPCM difference d into value = 2d (d >= 0) or
// 2|d|-1 (d < 0) by a bitwise inversion; k is the smallest k' <= 6 with
// 16 * 2^k' >= A, where A is the sum of |d| over the 15 differences.
package ec_pkg;

  typedef logic [7:0]   pix_t;     // one 8-bit sample
  typedef logic [8:0]   diff_t;    // two's complement DPCM difference
  typedef logic [8:0]   map_t;     // Rice-mapped value, 0..510
  typedef logic [2:0]   k_t;       // Golomb-Rice parameter, 0..6
  typedef logic [12:0]  len_t;     // accumulated code length / sum of |d|
  typedef logic [127:0] blk_t;     // a whole 4x4 block

  typedef enum logic [1:0] {
    SCAN0 = 2'd0,
    SCAN1 = 2'd1,
    SCAN3 = 2'd2,
    SCAN4 = 2'd3
  } scan_t;

  localparam int unsigned NPIX      = 16;   // pixels per 4x4 block
  localparam int unsigned NDIFF     = 15;   // DPCM differences per block
  localparam int unsigned NMODE     = 3;    // scan modes tried per block
  localparam int unsigned HDR_BITS  = 14;   // tag + scan_mode + k + first_pixel
  localparam int unsigned RAW_HDR   = 9;    // tag + first pixel (uncompressed)
  localparam int unsigned PARAM_LEN = 13;   // scan_mode + k + first_pixel
  localparam int unsigned SEG_LIMIT = 128;  // compressed segment size limit

  // Raster index of the j-th pixel along a scan mode.
  function automatic logic [3:0] scan_pos(input scan_t m, input logic [3:0] j);
    logic [3:0] t0 [16];
    logic [3:0] t1 [16];
    logic [3:0] t3 [16];
    logic [3:0] t4 [16];
    t0 = '{4'd0, 4'd4, 4'd8, 4'd12, 4'd13, 4'd9, 4'd5, 4'd1,
           4'd2, 4'd6, 4'd10, 4'd14, 4'd15, 4'd11, 4'd7, 4'd3};
    t1 = '{4'd0, 4'd1, 4'd2, 4'd3, 4'd7, 4'd6, 4'd5, 4'd4,
           4'd8, 4'd9, 4'd10, 4'd11, 4'd15, 4'd14, 4'd13, 4'd12};
    t3 = '{4'd0, 4'd1, 4'd4, 4'd8, 4'd5, 4'd2, 4'd3, 4'd6,
           4'd9, 4'd12, 4'd13, 4'd10, 4'd7, 4'd11, 4'd14, 4'd15};
    t4 = '{4'd3, 4'd2, 4'd7, 4'd11, 4'd6, 4'd1, 4'd0, 4'd5,
           4'd10, 4'd15, 4'd14, 4'd9, 4'd4, 4'd8, 4'd13, 4'd12};
    case (m)
      SCAN0:   return t0[j];
      SCAN1:   return t1[j];
      SCAN3:   return t3[j];
      default: return t4[j];
    endcase
  endfunction

  // Third scan mode chosen by the intra 4x4 prediction mode (first two are
  // always scan_mode_0 and scan_mode_1). Codes 9..15 do not occur in H.264;
  // they are treated like the DC mode.
  function automatic scan_t third_mode(input logic [3:0] intra);
    case (intra)
      4'd0, 4'd4, 4'd5, 4'd6: return SCAN4;
      default:                return SCAN3;
    endcase
  endfunction

  function automatic pix_t get_pix(input blk_t b, input logic [3:0] p);
    return b[127 - 8*p -: 8];
  endfunction

  function automatic map_t rice_map(input diff_t d);
    return d[8] ? {~d[7:0], 1'b1} : {d[7:0], 1'b0};
  endfunction

  function automatic diff_t rice_unmap(input map_t v);
    return v[0] ? {1'b1, ~v[8:1]} : {1'b0, v[8:1]};
  endfunction

  function automatic logic [7:0] abs_diff(input diff_t d);
    return d[8] ? 8'(-d) : d[7:0];
  endfunction

  // k = min{k' | 16 * 2^k' >= A}, saturated at 6.
  function automatic k_t k_of_sum(input len_t a);
    if      (a <= 13'd16)  return 3'd0;
    else if (a <= 13'd32)  return 3'd1;
    else if (a <= 13'd64)  return 3'd2;
    else if (a <= 13'd128) return 3'd3;
    else if (a <= 13'd256) return 3'd4;
    else if (a <= 13'd512) return 3'd5;
    else                   return 3'd6;
  endfunction

  // Golomb-Rice code length 1 + k + (value >> k).
  function automatic len_t gr_len(input map_t v, input k_t k);
    return len_t'({1'b0, k}) + 13'd1 + (len_t'(v) >> k);
  endfunction

  // Output bundle of the DPCM stage, for the three scan modes tried.
  typedef struct packed {
    map_t [NMODE-1:0][NDIFF-1:0] maps;   // Rice-mapped differences
    k_t   [NMODE-1:0]            k;
    scan_t [NMODE-1:0]           mode;
    pix_t [NMODE-1:0]            first;  // first pixel along each scan
    blk_t                        pixels; // the raw block
  } dpcm_out_t;

  // Output bundle of the code length predictor: one segment to code.
  typedef struct packed {
    logic                  tag;     // 1 = compressed, 0 = raw pixels
    scan_t                 mode;
    k_t                    k;
    pix_t                  first;
    map_t [NDIFF-1:0]      maps;    // chosen mode's values (tag = 1)
    blk_t                  pixels;  // raw block (tag = 0)
    len_t                  bits;    // segment length in bits
  } seg_t;

endpackage
