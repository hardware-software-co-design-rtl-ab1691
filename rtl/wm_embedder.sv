// wm_embedder: visible-watermark embedding of one DCT coefficient per cycle.
//
//     out_coef = 0.85 * cov_coef + 0.15 * wm_coef
//
// The cover (host image) coefficient cov_coef is weighted by 0.85 and the
// watermark coefficient wm_coef by 0.15, the empirically chosen embedding factors of the
// algorithm. The weights are unsigned Q16 constants (default 55706 and
// 9830, summing to exactly 65536); both products are summed at full width
// and rounded half up back to the input's resolution, so the result never needs more
// bits than the inputs. One register stage: out_valid/out_idx/out_coef
// follow in_valid/in_idx/cov_coef/wm_coef by one clock. The fixed-point
// format and the rounding are this design's choices.
module wm_embedder
  import wm_pkg::*;
#(
  parameter int unsigned W       = COEF_W,       // coefficient width (signed)
  parameter int unsigned K_FRAC  = EMB_FRAC,     // fractional bits of the weights
  parameter int unsigned K_COVER = EMB_K_COVER,  // cov_coef weight, Q(K_FRAC)
  parameter int unsigned K_WM    = EMB_K_WM      // wm_coef weight, Q(K_FRAC)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [IDX_W-1:0]    in_idx,
  input  logic signed [W-1:0] cov_coef,
  input  logic signed [W-1:0] wm_coef,
  output logic                out_valid,
  output logic [IDX_W-1:0]    out_idx,
  output logic signed [W-1:0] out_coef
);

  localparam int unsigned KW    = K_FRAC + 2;        // signed weight width
  localparam int unsigned SUM_W = W + KW + 1;

  localparam logic signed [KW-1:0] KC = KW'(K_COVER);
  localparam logic signed [KW-1:0] KM = KW'(K_WM);

  logic signed [SUM_W-1:0] sum, rounded;
  assign sum     = SUM_W'(cov_coef * KC) + SUM_W'(wm_coef * KM);
  assign rounded = (sum + SUM_W'(1 << (K_FRAC - 1))) >>> K_FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_coef  <= '0;
    end else begin
      out_valid <= in_valid;
      out_idx   <= in_idx;
      out_coef  <= rounded[W-1:0];
    end
  end

endmodule
