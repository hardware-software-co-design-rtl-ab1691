// dct2d_core: 8x8 two-dimensional forward or inverse DCT, computed directly
// from the double-sum definition with a single multiply-accumulate unit.
//
// Forward (inverse = 0):  X[u][v] = sum_{i,j} a[i][j] * T[u][i] * T[v][j]
// Inverse (inverse = 1):  a[i][j] = sum_{u,v} X[u][v] * T[u][i] * T[v][j]
// with the orthonormal basis T of wm_pkg. Each of the 64 outputs is one
// pass of 64 multiply-accumulates over the whole source block, so a block
// takes 64*64 = 4096 issue cycles; the document computes the transform by
// direct evaluation of these formulas, and the single shared MAC is this
// design's choice.
//
// Pipeline: issue (source address, basis pair) -> register sample and the
// basis product T*T (kept in Q20) -> register sample*basis -> accumulate.
// When the last term of an output is accumulated the result is rounded
// (half up), saturated to OUT_W bits and written.
//
// The transform is linear, so the core is indifferent to a binary point
// in its data: the co-processor feeds it words with 4 fractional bits.
//
// Interface: pulse start for one cycle while idle; inverse is sampled with
// it. The core reads the source block through rd_addr/rd_data, an
// asynchronous (same-cycle) read port, and must see the source unchanged
// until done. Results come out on wr_en/wr_addr/wr_data, one per 64 cycles,
// in row-major order. done pulses together with the last write, 4099 cycles
// after the start cycle (4096 issue cycles + 3 pipeline stages).
module dct2d_core
  import wm_pkg::*;
#(
  parameter int unsigned IN_W  = COEF_W,     // source sample width (signed)
  parameter int unsigned OUT_W = COEF_W      // result width (signed, saturated)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    inverse,
  output logic                    busy,
  output logic                    done,
  output logic [IDX_W-1:0]        rd_addr,
  input  logic signed [IN_W-1:0]  rd_data,
  output logic                    wr_en,
  output logic [IDX_W-1:0]        wr_addr,
  output logic signed [OUT_W-1:0] wr_data
);

  localparam int unsigned PROD_FRAC = 20;                 // basis product format
  localparam int unsigned BP_W      = PROD_FRAC + 1;      // |T*T| <= 0.25
  localparam int unsigned MUL_W     = IN_W + BP_W;
  localparam int unsigned ACC_W     = MUL_W + IDX_W;      // 64 terms

  // Basis table, folded to constants.
  logic signed [BASIS_W-1:0] basis [BLK_N][BLK_N];
  always_comb begin
    for (int u = 0; u < BLK_N; u++)
      for (int i = 0; i < BLK_N; i++)
        basis[u][i] = dct_basis(u, i);
  end

  // ---------------------------------------------------------------- issue
  logic             running, inv_q;
  logic [IDX_W-1:0] out_idx, sum_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      inv_q   <= 1'b0;
      out_idx <= '0;
      sum_idx <= '0;
    end else if (!running) begin
      if (start) begin
        running <= 1'b1;
        inv_q   <= inverse;
        out_idx <= '0;
        sum_idx <= '0;
      end
    end else begin
      sum_idx <= sum_idx + 1'b1;
      if (sum_idx == IDX_W'(BLK_SIZE - 1)) begin
        out_idx <= out_idx + 1'b1;
        if (out_idx == IDX_W'(BLK_SIZE - 1)) running <= 1'b0;
      end
    end
  end

  assign rd_addr = sum_idx;

  // Basis pair for (output, term): the frequency index is the output index
  // in the forward transform and the term index in the inverse one.
  logic [2:0] o_r, o_c, s_r, s_c;
  logic signed [BASIS_W-1:0]   b_row, b_col;
  logic signed [2*BASIS_W-1:0] b_prod;
  assign {o_r, o_c} = out_idx;
  assign {s_r, s_c} = sum_idx;
  always_comb begin
    if (inv_q) begin
      b_row = basis[s_r][o_r];
      b_col = basis[s_c][o_c];
    end else begin
      b_row = basis[o_r][s_r];
      b_col = basis[o_c][s_c];
    end
    b_prod = b_row * b_col;                                // Q30
  end

  // --------------------------------------------------------------- stage 1
  logic                    v1, first1, last1;
  logic [IDX_W-1:0]        oidx1;
  logic signed [IN_W-1:0]  d1;
  logic signed [BP_W-1:0]  bp1;

  // ---------------------------------------------------------------- stage 2
  logic                    v2, first2, last2;
  logic [IDX_W-1:0]        oidx2;
  logic signed [MUL_W-1:0] p2;

  // ---------------------------------------------------------------- stage 3
  logic signed [ACC_W-1:0] acc, acc_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0; oidx1 <= '0; d1 <= '0; bp1 <= '0;
      v2 <= 1'b0; first2 <= 1'b0; last2 <= 1'b0; oidx2 <= '0; p2 <= '0;
    end else begin
      v1     <= running;
      first1 <= running && sum_idx == '0;
      last1  <= running && sum_idx == IDX_W'(BLK_SIZE - 1);
      oidx1  <= out_idx;
      d1     <= rd_data;
      bp1    <= BP_W'(b_prod >>> (2 * BASIS_FRAC - PROD_FRAC));
      v2     <= v1;
      first2 <= first1;
      last2  <= last1;
      oidx2  <= oidx1;
      p2     <= d1 * bp1;
    end
  end

  assign acc_next = first2 ? ACC_W'(p2) : acc + ACC_W'(p2);

  // Round half up and saturate to OUT_W bits.
  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(1 << (OUT_W - 1));
  logic signed [ACC_W-1:0] rounded;
  assign rounded = (acc_next + ACC_W'(1 << (PROD_FRAC - 1))) >>> PROD_FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
      done    <= 1'b0;
    end else begin
      if (v2) acc <= acc_next;
      wr_en   <= v2 && last2;
      wr_addr <= oidx2;
      done    <= v2 && last2 && oidx2 == IDX_W'(BLK_SIZE - 1);
      if (rounded > OUT_MAX)      wr_data <= OUT_MAX[OUT_W-1:0];
      else if (rounded < OUT_MIN) wr_data <= OUT_MIN[OUT_W-1:0];
      else                        wr_data <= rounded[OUT_W-1:0];
    end
  end

  assign busy = running || v1 || v2 || wr_en && !done;

endmodule
