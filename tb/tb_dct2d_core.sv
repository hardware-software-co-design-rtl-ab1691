// tb_dct2d_core: self-checking test of the 8x8 DCT/IDCT core.
//
// The reference is the orthonormal 2-D DCT evaluated in double precision
// with $cos. Checks: a constant block of 62 (DC = 8 * 62 = 496, all other
// coefficients 0), random pixel blocks against the reference (within 1),
// inverse transforms of random coefficient blocks against the reference
// inverse (within 1), a forward-then-inverse round trip, and the
// start-to-done latency of 4099 cycles.
module tb_dct2d_core;
  import wm_pkg::*;

  localparam int LATENCY = 64 * 64 + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, inverse, busy, done, wr_en;
  logic [5:0] rd_addr, wr_addr;
  logic signed [COEF_W-1:0] rd_data, wr_data;
  logic signed [15:0] src [64];
  logic signed [15:0] res [64];
  int checks = 0, failures = 0;

  dct2d_core dut (.*);
  assign rd_data = COEF_W'(src[rd_addr]);  // sign-extended integer samples

  always_ff @(posedge clk) if (wr_en) res[wr_addr] <= wr_data[15:0];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real cbasis(int u, int i);
    real c = (u == 0) ? 1.0 / $sqrt(8.0) : 0.5;
    return c * $cos((2.0 * i + 1.0) * u * 3.14159265358979 / 16.0);
  endfunction

  function automatic real ref_val(logic signed [15:0] blk [64], int o, bit inv);
    real s = 0.0;
    for (int k = 0; k < 64; k++) begin
      if (!inv) s += blk[k] * cbasis(o / 8, k / 8) * cbasis(o % 8, k % 8);
      else      s += blk[k] * cbasis(k / 8, o / 8) * cbasis(k % 8, o % 8);
    end
    return s;
  endfunction

  task automatic run(input bit inv, output int cycles);
    @(negedge clk);
    start = 1'b1; inverse = inv;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    @(negedge clk);
  endtask

  task automatic check_near(int got, real exp, int tol, string what);
    real d = got - exp;
    checks++;
    if (d > tol + 0.5 || d < -tol - 0.5) begin
      failures++;
      $display("FAIL %s: got %0d expected %f", what, got, exp);
    end
  endtask

  int cyc;
  logic signed [15:0] orig [64];

  initial begin
    start = 0; inverse = 0;
    foreach (src[k]) src[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Constant block of the R component shown in the hyper-terminal capture.
    foreach (src[k]) src[k] = 16'sd62;
    run(1'b0, cyc);
    checks++;
    if (cyc != LATENCY) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, LATENCY);
    end
    checks++;
    if (res[0] != 16'sd496) begin failures++; $display("FAIL DC %0d", res[0]); end
    for (int k = 1; k < 64; k++) begin
      checks++;
      if (res[k] != 0) begin failures++; $display("FAIL AC[%0d] = %0d", k, res[k]); end
    end

    // Random pixel blocks: forward DCT, then inverse back to the pixels.
    for (int t = 0; t < 4; t++) begin
      foreach (src[k]) src[k] = 16'($urandom_range(0, 255));
      orig = src;
      run(1'b0, cyc);
      for (int k = 0; k < 64; k++) check_near(int'(res[k]), ref_val(orig, k, 1'b0), 1, "dct");
      src = res;
      run(1'b1, cyc);
      checks++;
      if (cyc != LATENCY) failures++;
      for (int k = 0; k < 64; k++) check_near(int'(res[k]), real'(orig[k]), 1, "roundtrip");
    end

    // Inverse transform of random signed coefficient blocks.
    for (int t = 0; t < 2; t++) begin
      foreach (src[k]) src[k] = 16'($signed($urandom_range(0, 400)) - 200);
      orig = src;
      run(1'b1, cyc);
      for (int k = 0; k < 64; k++) check_near(int'(res[k]), ref_val(orig, k, 1'b1), 1, "idct");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
