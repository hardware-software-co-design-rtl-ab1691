// tb_wm_embedder: self-checking test of the coefficient embedder.
//
// Drives one coefficient pair per cycle and compares each result, one
// cycle later, with round(0.85 * cov_coef + 0.15 * wm_coef) computed in
// floating point (within 1 for the rounding of the Q16 weights), and the
// exact value for a few hand-worked pairs.
module tb_wm_embedder;
  import wm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic [5:0] in_idx, out_idx;
  logic signed [COEF_W-1:0] cov_coef, wm_coef, out_coef;
  int checks = 0, failures = 0;

  wm_embedder dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int c, int w, int idx, int exact);
    real e;
    int g;
    @(negedge clk);
    in_valid = 1'b1; in_idx = 6'(idx); cov_coef = COEF_W'(c); wm_coef = COEF_W'(w);
    @(negedge clk);
    in_valid = 1'b0;
    e = 0.85 * c + 0.15 * w;
    g = int'(out_coef);
    checks += 3;
    if (!out_valid) failures++;
    if (out_idx != 6'(idx)) failures++;
    if (exact != 32'h7fffffff) begin
      if (g != exact) begin
        failures++;
        $display("FAIL %0d,%0d -> %0d expected %0d", c, w, out_coef, exact);
      end
    end else if (g - e > 1.0 || e - g > 1.0) begin
      failures++;
      $display("FAIL %0d,%0d -> %0d expected %f", c, w, out_coef, e);
    end
  endtask

  initial begin
    in_valid = 0; in_idx = 0; cov_coef = 0; wm_coef = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    apply(496, 0, 0, 422);      // 421.6
    apply(496, 496, 1, 496);    // equal inputs are unchanged
    apply(0, 400, 2, 60);       // 60.0
    apply(-100, 20, 3, -82);    // -85 + 3
    apply(100, -20, 4, 82);
    // Full datapath width: the Q16 weights are 0.8500061 and 0.1499939, so
    // 0.85 * 300000 - 0.15 * 200000 = 225000 comes out as 225003.17 -> 225003.
    apply(300000, -200000, 5, 225003);
    for (int t = 0; t < 500; t++)
      apply($signed($urandom_range(0, 8000)) - 4000, $signed($urandom_range(0, 8000)) - 4000,
            t % 64, 32'h7fffffff);
    @(negedge clk);
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
