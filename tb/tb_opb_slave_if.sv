// tb_opb_slave_if: self-checking test of the OPB slave attachment.
//
// A bus-functional OPB master holds OPB_select until Sl_xferAck (or gives up
// after 16 cycles, the OPB timeout). Behind the register port sits a
// 256-word register file in the testbench. Checks: write/read round trips
// with random data, the two-cycle transfer time, one reg_req per transfer,
// no acknowledge and no register access outside the address window, and
// Sl_DBus held at zero whenever no read is acknowledged.
module tb_opb_slave_if;
  localparam logic [31:0] BASE = 32'h7E00_0000;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] abus, dbus, sl_dbus, reg_wdata, reg_rdata;
  logic [3:0]  be, reg_be;
  logic        rnw, sel, ack, err, retry, tout, reg_req, reg_wr;
  logic [7:0]  reg_addr;
  logic [31:0] regs [256];
  int checks = 0, failures = 0, req_count = 0;

  opb_slave_if #(.BASEADDR(BASE), .ADDR_BITS(10)) dut (
    .OPB_Clk(clk), .OPB_Rst(rst), .OPB_ABus(abus), .OPB_BE(be), .OPB_DBus(dbus),
    .OPB_RNW(rnw), .OPB_select(sel), .Sl_DBus(sl_dbus), .Sl_xferAck(ack),
    .Sl_errAck(err), .Sl_retry(retry), .Sl_toutSup(tout),
    .reg_req, .reg_wr, .reg_addr, .reg_wdata, .reg_be, .reg_rdata);

  assign reg_rdata = regs[reg_addr];
  always_ff @(posedge clk) begin
    if (reg_req) req_count <= req_count + 1;
    if (reg_req && reg_wr) regs[reg_addr] <= reg_wdata;
  end

  // Sl_DBus must be zero outside read acknowledges.
  always @(negedge clk) if (!rst && !ack) begin
    checks++;
    if (sl_dbus != 0 || err || retry || tout) failures++;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One OPB transfer; returns the cycles to acknowledge (0 = timed out).
  task automatic xfer(input logic [31:0] a, input bit rd, input logic [31:0] wd,
                      output logic [31:0] rdat, output int cycles);
    @(negedge clk);
    sel = 1'b1; abus = a; rnw = rd; dbus = rd ? 32'h0 : wd; be = 4'hF;
    cycles = 0; rdat = '0;
    for (int c = 1; c <= 16; c++) begin
      @(negedge clk);
      if (ack) begin
        cycles = c + 1;    // counted from the cycle select rose
        rdat = sl_dbus;
        break;
      end
    end
    // The transfer ends at the clock edge that samples the acknowledge.
    @(posedge clk);
    #1;
    sel = 1'b0; abus = '0; dbus = '0;
  endtask

  logic [31:0] exp_mem [256];
  logic [31:0] rd;
  int cyc, req_before;

  initial begin
    sel = 0; abus = 0; dbus = 0; rnw = 1; be = 0;
    foreach (regs[k]) regs[k] = '0;
    foreach (exp_mem[k]) exp_mem[k] = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    for (int t = 0; t < 200; t++) begin
      automatic int w = $urandom_range(0, 255);
      automatic logic [31:0] d = $urandom;
      req_before = req_count;
      xfer(BASE + 32'(w * 4), 1'b0, d, rd, cyc);
      exp_mem[w] = d;
      checks += 2;
      if (cyc != 2) begin failures++; $display("FAIL write ack after %0d", cyc); end
      if (req_count != req_before + 1) failures++;
    end
    for (int w = 0; w < 256; w++) begin
      xfer(BASE + 32'(w * 4), 1'b1, '0, rd, cyc);
      checks += 2;
      if (cyc != 2) failures++;
      if (rd != exp_mem[w]) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", w, rd, exp_mem[w]);
      end
    end
    // Outside the window: no acknowledge, no access.
    req_before = req_count;
    xfer(BASE + 32'h400, 1'b0, 32'hDEAD_BEEF, rd, cyc);
    checks += 2;
    if (cyc != 0) failures++;
    if (req_count != req_before) failures++;
    xfer(32'h0000_0010, 1'b1, '0, rd, cyc);
    checks++;
    if (cyc != 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
