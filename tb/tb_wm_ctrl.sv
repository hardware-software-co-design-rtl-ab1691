// tb_wm_ctrl: self-checking test of the operation sequencer.
//
// The DCT/IDCT core is replaced by a stub that answers core_done CORE_LAT
// cycles after core_start, and the embedder by a one-cycle delay of the
// index stream. The test records every core launch (direction, source,
// destination, clamp) and every embed phase and compares them with the
// phase list of each operation, checks the operation lengths against
// hand-counted values (OP_DCT/OP_IDCT: CORE_LAT + 2, OP_EMBED: 66,
// OP_WATERMARK: 3 * CORE_LAT + 69 cycles) and checks that an unknown op
// code and a start while busy are rejected.
module tb_wm_ctrl;
  import wm_pkg::*;

  localparam int CORE_LAT = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done, rejected, core_start, core_inverse, clamp, core_done;
  logic emb_valid, emb_from_coef, emb_last;
  logic [5:0] emb_idx;
  logic [31:0] cycles;
  wm_op_e op;
  wm_src_e core_src;
  wm_dst_e core_dst, emb_dst;
  int checks = 0, failures = 0;

  wm_ctrl dut (.*);

  // Core stub.
  int core_cnt = -1;
  always_ff @(posedge clk) begin
    if (core_start) core_cnt <= CORE_LAT - 1;
    else if (core_cnt >= 0) core_cnt <= core_cnt - 1;
  end
  assign core_done = core_cnt == 0;

  // Embedder stub: result for index 63 one cycle after it was issued.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) emb_last <= 1'b0;
    else        emb_last <= emb_valid && emb_idx == 6'd63;

  // Phase log: one string per launched phase.
  string log_q [$];
  int    emb_count;
  always @(posedge clk) begin
    if (core_start)
      log_q.push_back($sformatf("core inv=%0d src=%0d dst=%0d", core_inverse, core_src, core_dst));
    if (clamp && core_start) log_q.push_back("clamp");
    if (emb_valid && emb_idx == 6'd0)
      log_q.push_back($sformatf("emb coef=%0d dst=%0d", emb_from_coef, emb_dst));
    if (emb_valid) emb_count++;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(wm_op_e o, int exp_cycles, string exp_log [$]);
    log_q.delete();
    emb_count = 0;
    @(negedge clk);
    start = 1'b1; op = o;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!busy) failures++;
    while (!done) @(negedge clk);
    checks += 2;
    if (busy) failures++;
    if (cycles != 32'(exp_cycles)) begin
      failures++;
      $display("FAIL op %0d took %0d cycles, expected %0d", o, cycles, exp_cycles);
    end
    checks++;
    if (log_q.size() != exp_log.size()) begin
      failures++;
      $display("FAIL op %0d: %0d phases, expected %0d", o, log_q.size(), exp_log.size());
    end else begin
      foreach (exp_log[k]) begin
        checks++;
        if (log_q[k] != exp_log[k]) begin
          failures++;
          $display("FAIL op %0d phase %0d: '%s' expected '%s'", o, k, log_q[k], exp_log[k]);
        end
      end
    end
  endtask

  initial begin
    start = 0; op = OP_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    run(OP_DCT,  CORE_LAT + 2, '{"core inv=0 src=0 dst=0"});
    run(OP_IDCT, CORE_LAT + 2, '{"core inv=1 src=0 dst=0"});
    run(OP_EMBED, 66, '{"emb coef=0 dst=0"});
    checks++;
    if (emb_count != 64) failures++;
    run(OP_WATERMARK, 3 * CORE_LAT + 69,
        '{"core inv=0 src=0 dst=1", "core inv=0 src=1 dst=2", "emb coef=1 dst=1",
          "core inv=1 src=2 dst=0", "clamp"});

    // Unknown op code: rejected, nothing starts.
    @(negedge clk);
    start = 1'b1; op = wm_op_e'(3'd6);
    #1;
    checks++;
    if (!rejected) failures++;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (busy) failures++;

    // Start while busy: rejected, the running operation continues.
    @(negedge clk);
    start = 1'b1; op = OP_DCT;
    @(negedge clk);
    op = OP_IDCT;
    #1;
    checks++;
    if (!rejected) failures++;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (cycles != 32'(CORE_LAT + 2)) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
