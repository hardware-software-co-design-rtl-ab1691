// wm_coprocessor: DCT/IDCT and embedding co-processor on the OPB.
//
// The hardware half of a visible-watermarking system. The processor
// software splits the host (cover) image and the watermark into 8x8 blocks
// of one colour component (R, G or B) and hands them to this peripheral,
// which transforms them with the 2-D DCT, mixes the coefficients as
// 0.85 * cover + 0.15 * watermark and returns the mix to the pixel domain
// with the 2-D inverse DCT. The transform is the expensive part and is the
// reason the block is in hardware.
//
// Structure: opb_slave_if decodes bus transfers into register accesses;
// five 64-word block buffers (A, B and OUT visible on the bus, C1 and C2
// internal) hold samples and coefficients: A, B and OUT as signed 16-bit
// integers, C1 and C2 as 20-bit numbers with 4 fractional bits, the format
// the datapath works in, so the chain rounds to integers only once;
// wm_ctrl sequences dct2d_core (one multiply-accumulate, 4099 cycles per
// block) and wm_embedder (one coefficient per cycle).
//
// Register map (word offsets from BASEADDR, 32-bit accesses):
//   0x000-0x0FC  buffer A, 64 words, read/write (cover block / coefficients)
//   0x100-0x1FC  buffer B, 64 words, read/write (watermark block)
//   0x200-0x2FC  buffer OUT, 64 words, read only (result)
//   0x300        CTRL   write: bits 2:0 = operation code (wm_pkg::wm_op_e),
//                       starts it; read: last accepted code
//   0x304        STATUS read: bit 0 busy, bit 1 done (sticky), bit 2 a
//                       start was rejected (sticky), bit 3 a buffer write
//                       arrived while busy and was dropped (sticky); the
//                       sticky bits clear when an operation is accepted
//   0x308        CYCLES read: clock cycles taken by the last operation
// Buffer words hold a signed 16-bit value in bits 15:0 (reads sign-extend);
// a buffer write needs byte enables 1:0, a CTRL write byte enable 0.
// Buffer writes are dropped while an operation runs so the sources stay
// stable. Operation times: OP_DCT and OP_IDCT 4101 cycles, OP_EMBED 66,
// OP_WATERMARK 12366 (three transforms of 4099 cycles plus 69).
//
// The document fixes the algorithm (DCT, weighted addition, IDCT, weights
// 0.15 and 0.85, 8x8 blocks) and places the DCT/IDCT peripheral on the OPB
// of an embedded PowerPC system; the register map, buffer organisation,
// number formats and timing are this design's.
module wm_coprocessor
  import wm_pkg::*;
#(
  parameter logic [31:0] BASEADDR = 32'h7E00_0000
) (
  input  logic        OPB_Clk,
  input  logic        OPB_Rst,
  input  logic [31:0] OPB_ABus,
  input  logic [3:0]  OPB_BE,
  input  logic [31:0] OPB_DBus,
  input  logic        OPB_RNW,
  input  logic        OPB_select,
  output logic [31:0] Sl_DBus,
  output logic        Sl_xferAck,
  output logic        Sl_errAck,
  output logic        Sl_retry,
  output logic        Sl_toutSup
);

  localparam int unsigned ADDR_BITS = 10;
  typedef logic signed [SAMPLE_W-1:0] sample_t;   // bus-visible word
  typedef logic signed [COEF_W-1:0]   coef_t;     // datapath word, COEF_FRAC fractional bits

  // Integer to datapath format (exact) and back (round half up, saturate).
  function automatic coef_t to_coef(sample_t x);
    return coef_t'(x) <<< COEF_FRAC;
  endfunction
  function automatic sample_t to_sample(coef_t y);
    logic signed [COEF_W:0] r;
    r = ((COEF_W + 1)'(y) + (COEF_W + 1)'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > (COEF_W + 1)'(32767))       return 16'sh7FFF;
    else if (r < -(COEF_W + 1)'(32768)) return 16'sh8000;
    return r[SAMPLE_W-1:0];
  endfunction

  logic clk, rst_n;
  assign clk   = OPB_Clk;
  assign rst_n = !OPB_Rst;

  // ------------------------------------------------------------ bus port
  logic                 reg_req, reg_wr;
  logic [ADDR_BITS-3:0] reg_addr;
  logic [31:0]          reg_wdata, reg_rdata;
  logic [3:0]           reg_be;

  opb_slave_if #(.BASEADDR(BASEADDR), .ADDR_BITS(ADDR_BITS)) u_opb (
    .OPB_Clk, .OPB_Rst, .OPB_ABus, .OPB_BE, .OPB_DBus, .OPB_RNW, .OPB_select,
    .Sl_DBus, .Sl_xferAck, .Sl_errAck, .Sl_retry, .Sl_toutSup,
    .reg_req, .reg_wr, .reg_addr, .reg_wdata, .reg_be, .reg_rdata);

  // Address decode: reg_addr[7:6] picks A, B, OUT or the registers.
  localparam logic [1:0] REGION_A = 2'd0, REGION_B = 2'd1, REGION_OUT = 2'd2, REGION_REG = 2'd3;
  localparam logic [5:0] REG_CTRL = 6'd0, REG_STATUS = 6'd1, REG_CYCLES = 6'd2;

  logic [1:0]       region;
  logic [IDX_W-1:0] word;
  assign {region, word} = reg_addr;

  // ------------------------------------------------------------ control
  logic        busy, done, rejected, start, core_start, core_inverse, core_done;
  logic        clamp, emb_valid, emb_from_coef, emb_last, core_busy;
  logic [31:0] cycles;
  logic [IDX_W-1:0] emb_idx;
  wm_op_e      op, last_op;
  wm_src_e     core_src;
  wm_dst_e     core_dst, emb_dst;

  assign start = reg_req && reg_wr && region == REGION_REG && word == REG_CTRL && reg_be[0];
  assign op    = wm_op_e'(reg_wdata[2:0]);

  wm_ctrl u_ctrl (
    .clk, .rst_n, .start, .op, .busy, .done, .rejected, .cycles,
    .core_start, .core_inverse, .core_src, .core_dst, .clamp, .core_done,
    .emb_valid, .emb_idx, .emb_from_coef, .emb_dst, .emb_last);

  // ------------------------------------------------------------ buffers
  sample_t buf_a [BLK_SIZE];
  sample_t buf_b [BLK_SIZE];
  sample_t buf_out [BLK_SIZE];
  coef_t   buf_c1 [BLK_SIZE];
  coef_t   buf_c2 [BLK_SIZE];

  // ------------------------------------------------------------ DCT/IDCT
  logic [IDX_W-1:0] core_rd_addr, core_wr_addr;
  coef_t            core_rd_data, core_wr_data;
  sample_t          core_wr_pixel;
  logic             core_wr_en;

  always_comb begin
    case (core_src)
      SRC_B:   core_rd_data = to_coef(buf_b[core_rd_addr]);
      SRC_C1:  core_rd_data = buf_c1[core_rd_addr];
      default: core_rd_data = to_coef(buf_a[core_rd_addr]);
    endcase
  end

  dct2d_core u_dct (
    .clk, .rst_n, .start(core_start), .inverse(core_inverse), .busy(core_busy),
    .done(core_done), .rd_addr(core_rd_addr), .rd_data(core_rd_data),
    .wr_en(core_wr_en), .wr_addr(core_wr_addr), .wr_data(core_wr_data));

  // Results for software are rounded to integers; the final pixels of the
  // watermarking chain are also clamped to 8 bits.
  sample_t core_wr_int;
  assign core_wr_int = to_sample(core_wr_data);
  always_comb begin
    core_wr_pixel = core_wr_int;
    if (clamp) begin
      if (core_wr_int < 0)             core_wr_pixel = '0;
      else if (core_wr_int > 16'sd255) core_wr_pixel = 16'sd255;
    end
  end

  // ------------------------------------------------------------ embedder
  coef_t            emb_cov, emb_wm, emb_out;
  logic             emb_out_valid;
  logic [IDX_W-1:0] emb_out_idx;

  assign emb_cov = emb_from_coef ? buf_c1[emb_idx] : to_coef(buf_a[emb_idx]);
  assign emb_wm  = emb_from_coef ? buf_c2[emb_idx] : to_coef(buf_b[emb_idx]);

  wm_embedder u_emb (
    .clk, .rst_n, .in_valid(emb_valid), .in_idx(emb_idx), .cov_coef(emb_cov),
    .wm_coef(emb_wm), .out_valid(emb_out_valid), .out_idx(emb_out_idx),
    .out_coef(emb_out));

  assign emb_last = emb_out_valid && emb_out_idx == IDX_W'(BLK_SIZE - 1);

  // ------------------------------------------------------------ buffer writes
  logic bus_buf_wr;
  assign bus_buf_wr = reg_req && reg_wr && reg_be[1:0] == 2'b11 &&
                      (region == REGION_A || region == REGION_B);

  always_ff @(posedge clk) begin
    if (bus_buf_wr && !busy) begin
      if (region == REGION_A) buf_a[word] <= reg_wdata[SAMPLE_W-1:0];
      else                    buf_b[word] <= reg_wdata[SAMPLE_W-1:0];
    end
    if (core_wr_en) begin
      case (core_dst)
        DST_C1:  buf_c1[core_wr_addr]  <= core_wr_data;
        DST_C2:  buf_c2[core_wr_addr]  <= core_wr_data;
        default: buf_out[core_wr_addr] <= core_wr_pixel;
      endcase
    end
    if (emb_out_valid) begin
      if (emb_dst == DST_C1) buf_c1[emb_out_idx]  <= emb_out;
      else                   buf_out[emb_out_idx] <= to_sample(emb_out);
    end
  end

  // ------------------------------------------------------------ status
  logic st_done, st_rejected, st_dropped, accepted;
  assign accepted = start && !busy && !rejected;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_done     <= 1'b0;
      st_rejected <= 1'b0;
      st_dropped  <= 1'b0;
      last_op     <= OP_NONE;
    end else begin
      if (accepted) begin
        st_done     <= 1'b0;
        st_rejected <= 1'b0;
        st_dropped  <= 1'b0;
        last_op     <= op;
      end else begin
        if (done)                st_done     <= 1'b1;
        if (rejected)            st_rejected <= 1'b1;
        if (bus_buf_wr && busy)  st_dropped  <= 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ bus reads
  always_comb begin
    reg_rdata = '0;
    case (region)
      REGION_A:   reg_rdata = 32'(buf_a[word]);
      REGION_B:   reg_rdata = 32'(buf_b[word]);
      REGION_OUT: reg_rdata = 32'(buf_out[word]);
      default: case (word)
        REG_CTRL:   reg_rdata = {29'd0, last_op};
        REG_STATUS: reg_rdata = {27'd0, core_busy, st_dropped, st_rejected, st_done || done, busy};
        REG_CYCLES: reg_rdata = cycles;
        default:    reg_rdata = '0;
      endcase
    endcase
  end

endmodule
