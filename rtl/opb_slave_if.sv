// opb_slave_if: On-chip Peripheral Bus (OPB) slave attachment.
//
// Turns OPB transfers addressed to [BASEADDR, BASEADDR + 2**ADDR_BITS) into
// single-cycle accesses on a simple register port. The OPB is fully
// synchronous with 32-bit address and data; bit 0 here is the least
// significant bit (the IBM convention numbers the same wires 31..0 the other
// way round).
//
// Timing: in the first cycle of a selected transfer that hits the window,
// reg_req is high for one cycle with reg_wr = !OPB_RNW, the word address,
// write data and byte enables; a write takes effect at the end of that
// cycle and, for a read, reg_rdata is sampled then. In the next cycle
// Sl_xferAck is high for one cycle and, for a read, Sl_DBus carries the
// data. Sl_DBus is zero whenever the slave does not acknowledge, as the
// OR-ed OPB data bus requires. Every transfer therefore takes two cycles;
// the slave never asks for retry, never reports an error and never
// suppresses the bus timeout. OPB_seqAddr is not used: sequential bursts
// are served as single transfers. The window, the two-cycle timing and the
// register port are this design's choices; the document only places the
// DCT/IDCT peripheral on the OPB.
module opb_slave_if #(
  parameter logic [31:0] BASEADDR  = 32'h7E00_0000,
  parameter int unsigned ADDR_BITS = 10               // window size, bytes = 2**ADDR_BITS
) (
  input  logic                   OPB_Clk,
  input  logic                   OPB_Rst,
  input  logic [31:0]            OPB_ABus,
  input  logic [3:0]             OPB_BE,
  input  logic [31:0]            OPB_DBus,
  input  logic                   OPB_RNW,
  input  logic                   OPB_select,
  output logic [31:0]            Sl_DBus,
  output logic                   Sl_xferAck,
  output logic                   Sl_errAck,
  output logic                   Sl_retry,
  output logic                   Sl_toutSup,
  // register port
  output logic                   reg_req,
  output logic                   reg_wr,
  output logic [ADDR_BITS-3:0]   reg_addr,
  output logic [31:0]            reg_wdata,
  output logic [3:0]             reg_be,
  input  logic [31:0]            reg_rdata
);

  logic hit;
  assign hit = OPB_select && (OPB_ABus[31:ADDR_BITS] == BASEADDR[31:ADDR_BITS]);

  // The acknowledge cycle is never itself the start of a new access.
  assign reg_req   = hit && !Sl_xferAck;
  assign reg_wr    = !OPB_RNW;
  assign reg_addr  = OPB_ABus[ADDR_BITS-1:2];
  assign reg_wdata = OPB_DBus;
  assign reg_be    = OPB_BE;

  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      Sl_xferAck <= 1'b0;
      Sl_DBus    <= '0;
    end else begin
      Sl_xferAck <= reg_req;
      Sl_DBus    <= (reg_req && OPB_RNW) ? reg_rdata : '0;
    end
  end

  assign Sl_errAck  = 1'b0;
  assign Sl_retry   = 1'b0;
  assign Sl_toutSup = 1'b0;

  // Bus rules this slave keeps.
  property p_ack_in_transfer;
    @(posedge OPB_Clk) disable iff (OPB_Rst) Sl_xferAck |-> OPB_select;
  endproperty
  property p_dbus_idle_zero;
    @(posedge OPB_Clk) disable iff (OPB_Rst) !Sl_xferAck |-> Sl_DBus == '0;
  endproperty
  property p_ack_one_cycle;
    @(posedge OPB_Clk) disable iff (OPB_Rst) Sl_xferAck |=> !Sl_xferAck;
  endproperty
  a_ack_in_transfer: assert property (p_ack_in_transfer);
  a_dbus_idle_zero:  assert property (p_dbus_idle_zero);
  a_ack_one_cycle:   assert property (p_ack_one_cycle);

endmodule
