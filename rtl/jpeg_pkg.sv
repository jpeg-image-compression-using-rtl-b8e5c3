// jpeg_pkg -- types, constants and table functions shared by the JPEG
// compression accelerator.
//
// The accelerator works on 8x8 blocks. A pixel arrives as a packed 24-bit
// word {Cr, Cb, Y} with Y in bits 7:0. Each colour component of a pixel block
// is processed as its own "component block" of 64 samples, level-shifted by
// -128 before the DCT. Between pipeline stages a whole block travels in
// parallel as a packed array together with a small metadata struct.
//
// Fixed-point conventions (this design's choices):
//   * DCT basis coefficients are scaled by 2^12 (DCT_FRAC) and rounded;
//   * the row pass keeps 3 fractional bits (ROW_FRAC);
//   * DCT and quantized coefficients are 12-bit two's complement.
// Quantization tables reset to the example luminance / chrominance tables of
// the JPEG baseline standard (ISO/IEC 10918-1, Annex K).
// The 8x8 block, the packed {Cr, Cb, Y} pixel and the 48-bit output word
// follow the source design; the fixed-point scales, the metadata and the
// field layout of the output word are this design's choices.
package jpeg_pkg;

  localparam int BLK_N    = 8;              // block edge
  localparam int BLK_SZ   = BLK_N * BLK_N;  // samples per block
  localparam int DCT_FRAC = 12;             // basis coefficient scale 2^12
  localparam int ROW_FRAC = 3;              // fraction bits kept after row pass

  typedef logic signed [8:0]  sample_t;     // level-shifted sample, -128..127
  typedef logic signed [11:0] coef_t;       // DCT / quantized coefficient
  typedef logic signed [15:0] row_t;        // intermediate after row pass
  typedef logic signed [12:0] basis_t;      // scaled DCT basis coefficient
  typedef logic [7:0]         qval_t;       // quantization table entry (1..255)

  typedef sample_t [BLK_SZ-1:0] sample_blk_t;
  typedef coef_t   [BLK_SZ-1:0] coef_blk_t;
  typedef qval_t   [BLK_SZ-1:0] qtab_t;

  typedef enum logic [1:0] {
    COMP_Y  = 2'd0,
    COMP_CB = 2'd1,
    COMP_CR = 2'd2
  } comp_e;

  // Travels alongside every component block through the pipeline.
  typedef struct packed {
    logic [23:0] idx;   // pixel-block number within the image
    comp_e       comp;  // which colour component
    logic        last;  // final component block of the image
  } blk_meta_t;

  // One run-length tuple on the 48-bit compressed output stream.
  typedef struct packed {
    logic [23:0] blk;    // 47:24 pixel-block number
    logic [2:0]  rsvd;   // 23:21 zero
    logic        eob;    // 20    end-of-block marker
    comp_e       comp;   // 19:18 colour component
    logic [5:0]  run;    // 17:12 zeros skipped before value (EOB: trailing zeros)
    coef_t       value;  // 11:0  coefficient value (EOB: 0)
  } rle_tuple_t;

  // cos(k*pi/16)/2 * 2^12 rounded, k = 0..8
  function automatic basis_t half_cos(input int k);
    case (k)
      0: return 13'sd2048;
      1: return 13'sd2009;
      2: return 13'sd1892;
      3: return 13'sd1703;
      4: return 13'sd1448;
      5: return 13'sd1138;
      6: return 13'sd784;
      7: return 13'sd400;
      default: return 13'sd0;
    endcase
  endfunction

  // DCT-II basis A[u][x] = C(u)/2 * cos((2x+1)u*pi/16) * 2^12, C(0)=1/sqrt(2).
  // The angle is reduced to 0..pi with the sign folded out.
  function automatic basis_t dct_basis(input int u, input int x);
    int k;
    logic neg;
    if (u == 0) return half_cos(4);           // 1/(2*sqrt 2) = cos(pi/4)/2
    k = ((2 * x + 1) * u) % 32;               // angle in units of pi/16
    if (k > 16) k = 32 - k;                   // cos is even about 0 and 2*pi
    neg = 1'b0;
    if (k > 8) begin                          // cos(pi - a) = -cos(a)
      k   = 16 - k;
      neg = 1'b1;
    end
    return neg ? -half_cos(k) : half_cos(k);
  endfunction

  // Natural (row-major) index of the k-th coefficient in zigzag order.
  // Walks the anti-diagonals d = row+col, alternating direction.
  function automatic logic [5:0] zigzag_index(input int k);
    int n, d, len, start, pos, r, c;
    n = 0;
    for (d = 0; d < 2 * BLK_N - 1; d++) begin
      len   = (d < BLK_N) ? d + 1 : 2 * BLK_N - 1 - d;
      start = n;
      if (k >= start && k < start + len) begin
        pos = k - start;
        // even diagonals run bottom-left to top-right, odd ones the reverse
        if (d % 2 == 0) r = ((d < BLK_N) ? d : BLK_N - 1) - pos;
        else            r = ((d < BLK_N) ? 0 : d - BLK_N + 1) + pos;
        c = d - r;
        return 6'(r * BLK_N + c);
      end
      n = n + len;
    end
    return 6'd0;
  endfunction

  // Example quantization tables, JPEG baseline standard Annex K (row-major).
  localparam qval_t QLUMA_DEF [BLK_SZ] = '{
    8'd16, 8'd11, 8'd10, 8'd16, 8'd24,  8'd40,  8'd51,  8'd61,
    8'd12, 8'd12, 8'd14, 8'd19, 8'd26,  8'd58,  8'd60,  8'd55,
    8'd14, 8'd13, 8'd16, 8'd24, 8'd40,  8'd57,  8'd69,  8'd56,
    8'd14, 8'd17, 8'd22, 8'd29, 8'd51,  8'd87,  8'd80,  8'd62,
    8'd18, 8'd22, 8'd37, 8'd56, 8'd68,  8'd109, 8'd103, 8'd77,
    8'd24, 8'd35, 8'd55, 8'd64, 8'd81,  8'd104, 8'd113, 8'd92,
    8'd49, 8'd64, 8'd78, 8'd87, 8'd103, 8'd121, 8'd120, 8'd101,
    8'd72, 8'd92, 8'd95, 8'd98, 8'd112, 8'd100, 8'd103, 8'd99
  };

  localparam qval_t QCHROMA_DEF [BLK_SZ] = '{
    8'd17, 8'd18, 8'd24, 8'd47, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd18, 8'd21, 8'd26, 8'd66, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd24, 8'd26, 8'd56, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd47, 8'd66, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99
  };

endpackage
