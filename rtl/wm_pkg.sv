// wm_pkg: constants, types and the DCT basis shared by the watermarking
// co-processor.
//
// The transform works on 8x8 blocks of one colour component, stored
// row-major as 64 signed 16-bit words (index = 8*row + column). Inside the
// datapath every value carries COEF_FRAC = 4 extra fractional bits (20-bit
// words), so coefficients passed from one stage to the next are not rounded
// to integers; only results handed back to software are. The
// orthonormal DCT-II basis is
//     T[u][i] = c(u) * cos((2i+1) u pi / 16),  c(0) = 1/sqrt(8), c(u>0) = 1/2
// held as signed Q15 numbers; the 2-D transform of a block uses the product
// T[u][i] * T[v][j] of two of them. The embedding weights are the 0.85 (cover)
// and 0.15 (watermark) factors of the visible watermarking algorithm, held as
// unsigned Q16 numbers that sum to exactly 1.0. The Q formats, the register
// map and the operation codes are choices of this design.
package wm_pkg;

  localparam int unsigned BLK_N    = 8;              // block edge
  localparam int unsigned BLK_SIZE = BLK_N * BLK_N;  // samples per block
  localparam int unsigned IDX_W    = 6;              // log2(BLK_SIZE)
  localparam int unsigned SAMPLE_W = 16;             // bus-visible sample / coefficient width
  localparam int unsigned COEF_FRAC = 4;             // fractional bits inside the datapath
  localparam int unsigned COEF_W   = SAMPLE_W + COEF_FRAC;  // datapath word width
  localparam int unsigned BASIS_W  = 16;             // Q15 basis entry width
  localparam int unsigned BASIS_FRAC = 15;

  // Embedding weights, Q16: round(0.85 * 65536) and 65536 minus it.
  localparam int unsigned EMB_FRAC    = 16;
  localparam int unsigned EMB_K_COVER = 55706;       // 0.85
  localparam int unsigned EMB_K_WM    = 9830;        // 0.15

  // Operation codes written to the control register.
  typedef enum logic [2:0] {
    OP_NONE      = 3'd0,
    OP_DCT       = 3'd1,   // buffer A -> forward DCT -> buffer OUT
    OP_IDCT      = 3'd2,   // buffer A -> inverse DCT -> buffer OUT
    OP_EMBED     = 3'd3,   // 0.85*A + 0.15*B (coefficients) -> buffer OUT
    OP_WATERMARK = 3'd4    // DCT(A), DCT(B), embed, IDCT -> pixels in buffer OUT
  } wm_op_e;

  // Source and destination selectors for the block buffers.
  typedef enum logic [1:0] {SRC_A = 2'd0, SRC_B = 2'd1, SRC_C1 = 2'd2} wm_src_e;
  typedef enum logic [1:0] {DST_OUT = 2'd0, DST_C1 = 2'd1, DST_C2 = 2'd2} wm_dst_e;

  // 0.5 * cos(k pi / 16) in Q15, k = 0..8.
  function automatic logic signed [BASIS_W-1:0] half_cos_q15(input int unsigned k);
    case (k)
      0: return 16'sd16384;
      1: return 16'sd16069;
      2: return 16'sd15137;
      3: return 16'sd13623;
      4: return 16'sd11585;
      5: return 16'sd9102;
      6: return 16'sd6270;
      7: return 16'sd3196;
      default: return 16'sd0;
    endcase
  endfunction

  // DCT basis entry T[u][i] in Q15 (u = frequency, i = sample position).
  function automatic logic signed [BASIS_W-1:0] dct_basis(input int unsigned u,
                                                          input int unsigned i);
    int unsigned k;
    if (u == 0) return 16'sd11585;                  // 1/sqrt(8)
    k = ((2 * i + 1) * u) % 32;                     // angle in units of pi/16
    if (k > 16) k = 32 - k;                         // cos(2pi - x) = cos(x)
    if (k > 8) return -half_cos_q15(16 - k);        // cos(pi - x) = -cos(x)
    return half_cos_q15(k);
  endfunction

endpackage
