// tb_wm_coprocessor: end-to-end test of the watermarking co-processor
// through its OPB port, at the default parameters.
//
// A bus-functional OPB master loads blocks, starts operations, polls the
// status register and reads the results back. Every result is compared
// with a double-precision model of the algorithm (orthonormal 8x8 DCT,
// 0.85/0.15 mix, inverse DCT, rounding, clamp to 0..255) computed here.
// Scenarios: the constant R, G and B blocks of the three test processes
// (62, 57, 63: DC coefficients 496, 456, 504) through OP_DCT and the full
// OP_WATERMARK chain; OP_IDCT of the coefficients; OP_EMBED of random
// coefficient blocks; random pixel blocks through OP_WATERMARK; out-of-range
// pixels that exercise the clamp; a start while busy and an unknown op code
// (both rejected); a buffer write while busy (dropped); and the CYCLES
// register against the hand-counted operation lengths. Each of these
// mechanisms is counted and one that never happened is a failure.
module tb_wm_coprocessor;
  import wm_pkg::*;

  localparam logic [31:0] BASE = 32'h7E00_0000;
  localparam logic [31:0] A_OFF = 32'h000, B_OFF = 32'h100, OUT_OFF = 32'h200;
  localparam logic [31:0] CTRL = 32'h300, STATUS = 32'h304, CYCLES = 32'h308;
  localparam int T_XFORM = 4101, T_EMBED = 66, T_WM = 3 * 4099 + 69;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] abus, dbus, sl_dbus;
  logic [3:0]  be;
  logic        rnw, sel, ack, err, retry, tout;
  int checks = 0, failures = 0;

  wm_coprocessor dut (
    .OPB_Clk(clk), .OPB_Rst(rst), .OPB_ABus(abus), .OPB_BE(be), .OPB_DBus(dbus),
    .OPB_RNW(rnw), .OPB_select(sel), .Sl_DBus(sl_dbus), .Sl_xferAck(ack),
    .Sl_errAck(err), .Sl_retry(retry), .Sl_toutSup(tout));

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ OPB master
  task automatic opb(input logic [31:0] off, input bit rd, input logic [31:0] wd,
                     output logic [31:0] rdat);
    bit got = 0;
    @(negedge clk);
    sel = 1'b1; abus = BASE + off; rnw = rd; dbus = rd ? '0 : wd; be = 4'hF;
    rdat = '0;
    for (int c = 0; c < 16; c++) begin
      @(negedge clk);
      if (ack) begin rdat = sl_dbus; got = 1; break; end
    end
    @(posedge clk);
    #1;
    sel = 1'b0; abus = '0; dbus = '0;
    checks++;
    if (!got) begin failures++; $display("FAIL OPB timeout at %h", off); end
  endtask

  task automatic wr(input logic [31:0] off, input logic [31:0] d);
    logic [31:0] unused;
    opb(off, 1'b0, d, unused);
  endtask

  task automatic rd(input logic [31:0] off, output logic [31:0] d);
    opb(off, 1'b1, '0, d);
  endtask

  typedef int blk_t [64];

  task automatic load(input logic [31:0] off, input blk_t b);
    for (int k = 0; k < 64; k++) wr(off + 32'(4 * k), 32'(b[k]));
  endtask

  task automatic read_out(output blk_t b);
    logic [31:0] d;
    for (int k = 0; k < 64; k++) begin
      rd(OUT_OFF + 32'(4 * k), d);
      b[k] = int'($signed(d));
    end
  endtask

  // Start an operation, poll STATUS until done, check CYCLES.
  task automatic run(input wm_op_e op, input int exp_cycles);
    logic [31:0] st, cyc;
    wr(CTRL, 32'(op));
    do rd(STATUS, st); while (st[0]);
    checks += 2;
    if (!st[1]) begin failures++; $display("FAIL op %0d: done bit clear", op); end
    rd(CYCLES, cyc);
    if (cyc != 32'(exp_cycles)) begin
      failures++;
      $display("FAIL op %0d took %0d cycles, expected %0d", op, cyc, exp_cycles);
    end
  endtask

  // ------------------------------------------------------------ reference
  function automatic real cb(int u, int i);
    real c = (u == 0) ? 1.0 / $sqrt(8.0) : 0.5;
    return c * $cos((2.0 * i + 1.0) * u * 3.14159265358979 / 16.0);
  endfunction

  typedef real rblk_t [64];

  function automatic rblk_t xform(rblk_t x, bit inv);
    rblk_t y;
    for (int o = 0; o < 64; o++) begin
      y[o] = 0.0;
      for (int k = 0; k < 64; k++)
        if (!inv) y[o] += x[k] * cb(o / 8, k / 8) * cb(o % 8, k % 8);
        else      y[o] += x[k] * cb(k / 8, o / 8) * cb(k % 8, o % 8);
    end
    return y;
  endfunction

  function automatic rblk_t to_real(blk_t b);
    rblk_t r;
    foreach (b[k]) r[k] = b[k];
    return r;
  endfunction

  function automatic rblk_t ref_watermark(blk_t cov, blk_t wm);
    rblk_t c = xform(to_real(cov), 1'b0), w = xform(to_real(wm), 1'b0), m, p;
    foreach (m[k]) m[k] = 0.85 * c[k] + 0.15 * w[k];
    p = xform(m, 1'b1);
    foreach (p[k]) p[k] = p[k] < 0.0 ? 0.0 : p[k] > 255.0 ? 255.0 : p[k];
    return p;
  endfunction

  task automatic compare(blk_t got, rblk_t exp, real tol, string what);
    int bad = 0;
    for (int k = 0; k < 64; k++) begin
      checks++;
      if (got[k] - exp[k] > tol || exp[k] - got[k] > tol) begin
        failures++;
        if (bad++ < 4) $display("FAIL %s[%0d]: got %0d expected %f", what, k, got[k], exp[k]);
      end
    end
  endtask

  // ------------------------------------------------------------ mechanisms
  int n_dct, n_idct, n_embed, n_wm, n_clamp, n_rej_busy, n_rej_op, n_dropped;

  always @(posedge clk)
    if (dut.u_dct.wr_en && dut.clamp && dut.core_wr_pixel != dut.core_wr_int) n_clamp <= n_clamp + 1;

  blk_t cov, wmk, res, coef;
  rblk_t expv;
  logic [31:0] st, d;

  initial begin
    sel = 0; abus = 0; dbus = 0; rnw = 1; be = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    // The three test processes: constant R, G and B blocks.
    for (int p = 0; p < 3; p++) begin
      automatic int v = (p == 0) ? 62 : (p == 1) ? 57 : 63;
      foreach (cov[k]) cov[k] = v;
      foreach (wmk[k]) wmk[k] = $urandom_range(v - 8, v + 2);
      load(A_OFF, cov);
      run(OP_DCT, T_XFORM); n_dct++;
      read_out(coef);
      checks++;
      if (coef[0] != 8 * v) begin failures++; $display("FAIL DC %0d for %0d", coef[0], v); end
      for (int k = 1; k < 64; k++) begin
        checks++;
        if (coef[k] != 0) failures++;
      end
      load(B_OFF, wmk);
      run(OP_WATERMARK, T_WM); n_wm++;
      read_out(res);
      compare(res, ref_watermark(cov, wmk), 1.0, "process");
      // Watermarked pixels stay close to the host image.
      for (int k = 0; k < 64; k++) begin
        checks++;
        if (res[k] < v - 3 || res[k] > v + 1) failures++;
      end
    end

    // Inverse DCT of a forward-transformed random block.
    foreach (cov[k]) cov[k] = $urandom_range(0, 255);
    load(A_OFF, cov);
    run(OP_DCT, T_XFORM); n_dct++;
    read_out(coef);
    compare(coef, xform(to_real(cov), 1'b0), 1.0, "dct");
    load(A_OFF, coef);
    run(OP_IDCT, T_XFORM); n_idct++;
    read_out(res);
    compare(res, to_real(cov), 1.0, "idct");

    // Embedding of coefficient blocks given by software.
    for (int t = 0; t < 2; t++) begin
      foreach (cov[k]) cov[k] = $signed($urandom_range(0, 2000)) - 1000;
      foreach (wmk[k]) wmk[k] = $signed($urandom_range(0, 2000)) - 1000;
      load(A_OFF, cov);
      load(B_OFF, wmk);
      run(OP_EMBED, T_EMBED); n_embed++;
      read_out(res);
      foreach (expv[k]) expv[k] = 0.85 * cov[k] + 0.15 * wmk[k];
      compare(res, expv, 1.0, "embed");
    end

    // Random images through the whole chain.
    for (int t = 0; t < 2; t++) begin
      foreach (cov[k]) cov[k] = $urandom_range(0, 255);
      foreach (wmk[k]) wmk[k] = $urandom_range(0, 255);
      load(A_OFF, cov);
      load(B_OFF, wmk);
      run(OP_WATERMARK, T_WM); n_wm++;
      read_out(res);
      compare(res, ref_watermark(cov, wmk), 1.0, "watermark");
    end

    // Out-of-range samples: the clamp holds the pixels to 0..255.
    foreach (cov[k]) cov[k] = (k % 2 == 1) ? 400 : -150;
    foreach (wmk[k]) wmk[k] = (k % 2 == 1) ? 400 : -150;
    load(A_OFF, cov);
    load(B_OFF, wmk);
    run(OP_WATERMARK, T_WM); n_wm++;
    read_out(res);
    compare(res, ref_watermark(cov, wmk), 1.0, "clamp");

    // Start while busy and buffer write while busy.
    foreach (cov[k]) cov[k] = 10;
    load(A_OFF, cov);
    wr(CTRL, 32'(OP_DCT));
    wr(CTRL, 32'(OP_IDCT));
    wr(A_OFF + 32'h10, 32'd99);
    do rd(STATUS, st); while (st[0]);
    checks += 3;
    if (!st[2]) failures++; else n_rej_busy++;
    if (!st[3]) failures++; else n_dropped++;
    rd(CTRL, d);
    if (d[2:0] != OP_DCT) failures++;
    rd(A_OFF + 32'h10, d);
    checks++;
    if (d != 32'd10) failures++;
    read_out(res);
    checks++;
    if (res[0] != 80) failures++;
    n_dct++;

    // Unknown op code: rejected, nothing runs.
    wr(CTRL, 32'd7);
    rd(STATUS, st);
    checks += 2;
    if (st[0]) failures++;
    if (!st[2]) failures++; else n_rej_op++;

    $display("mechanisms: dct=%0d idct=%0d embed=%0d watermark=%0d clamp=%0d reject_busy=%0d reject_op=%0d dropped_write=%0d",
             n_dct, n_idct, n_embed, n_wm, n_clamp, n_rej_busy, n_rej_op, n_dropped);
    checks += 8;
    if (n_dct == 0) failures++;
    if (n_idct == 0) failures++;
    if (n_embed == 0) failures++;
    if (n_wm == 0) failures++;
    if (n_clamp == 0) failures++;
    if (n_rej_busy == 0) failures++;
    if (n_rej_op == 0) failures++;
    if (n_dropped == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
