// tb_wm_image: watermarks a whole small RGB image through the co-processor,
// block by block, the way the processor software drives it.
//
// The testbench plays the software half: it builds a 16x16 host image (a
// colour gradient) and a 16x16 watermark (a bright frame and cross on a
// dark ground) as interleaved R,G,B bytes, separates them into R, G and B
// planes, cuts each plane into 8x8 blocks, runs OP_WATERMARK on every
// (component, block) pair over the OPB and reassembles the result. Every
// output pixel is compared with a double-precision model of the chain
// (DCT, 0.85/0.15 mix, inverse DCT, round, clamp) and with the equivalent
// pixel-domain blend 0.85 * host + 0.15 * watermark, both within 1. The
// twelve operations must each take 12366 cycles.
module tb_wm_image;
  import wm_pkg::*;

  localparam int W = 16, H = 16;
  localparam logic [31:0] BASE = 32'h7E00_0000;
  localparam logic [31:0] A_OFF = 32'h000, B_OFF = 32'h100, OUT_OFF = 32'h200;
  localparam logic [31:0] CTRL = 32'h300, STATUS = 32'h304, CYCLES = 32'h308;
  localparam int T_WM = 3 * 4099 + 69;

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
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    if (!got) begin failures++; $display("FAIL OPB timeout at %h", off); end
  endtask

  // Interleaved images, R,G,B per pixel, row-major.
  byte unsigned host_rgb [W * H * 3];
  byte unsigned mark_rgb [W * H * 3];
  byte unsigned out_rgb  [W * H * 3];

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

  // Pixel (x, y) of component c in an interleaved image.
  function automatic int pix(int x, int y, int c);
    return (y * W + x) * 3 + c;
  endfunction

  int n_blocks;
  logic [31:0] d, st;
  rblk_t hb, mb, hc, mc, mix, ref_blk;

  initial begin
    sel = 0; abus = 0; dbus = 0; rnw = 1; be = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic bit line = (x == 1 || x == W - 2 || y == 1 || y == H - 2 || x == y);
        host_rgb[pix(x, y, 0)] = 8'(40 + 12 * x);
        host_rgb[pix(x, y, 1)] = 8'(30 + 10 * y);
        host_rgb[pix(x, y, 2)] = 8'(200 - 6 * x - 5 * y);
        for (int c = 0; c < 3; c++) mark_rgb[pix(x, y, c)] = line ? 8'd250 : 8'd10;
      end
    repeat (3) @(posedge clk);
    rst = 1'b0;

    for (int c = 0; c < 3; c++)
      for (int by = 0; by < H / 8; by++)
        for (int bx = 0; bx < W / 8; bx++) begin
          // Separate one component block of each image and load it.
          for (int k = 0; k < 64; k++) begin
            automatic int p = pix(bx * 8 + k % 8, by * 8 + k / 8, c);
            hb[k] = host_rgb[p];
            mb[k] = mark_rgb[p];
            opb(A_OFF + 32'(4 * k), 1'b0, 32'(host_rgb[p]), d);
            opb(B_OFF + 32'(4 * k), 1'b0, 32'(mark_rgb[p]), d);
          end
          opb(CTRL, 1'b0, 32'(OP_WATERMARK), d);
          do opb(STATUS, 1'b1, '0, st); while (st[0]);
          opb(CYCLES, 1'b1, '0, d);
          checks++;
          if (d != 32'(T_WM)) begin failures++; $display("FAIL cycles %0d", d); end
          n_blocks++;
          // Reference for this block.
          hc = xform(hb, 1'b0);
          mc = xform(mb, 1'b0);
          foreach (mix[k]) mix[k] = 0.85 * hc[k] + 0.15 * mc[k];
          ref_blk = xform(mix, 1'b1);
          for (int k = 0; k < 64; k++) begin
            automatic int p = pix(bx * 8 + k % 8, by * 8 + k / 8, c);
            automatic real blend = 0.85 * hb[k] + 0.15 * mb[k];
            automatic int got;
            opb(OUT_OFF + 32'(4 * k), 1'b1, '0, d);
            got = int'($signed(d));
            out_rgb[p] = 8'(got);
            checks += 2;
            if (got - ref_blk[k] > 1.0 || ref_blk[k] - got > 1.0) begin
              failures++;
              $display("FAIL c%0d block(%0d,%0d)[%0d]: %0d vs model %f", c, bx, by, k, got, ref_blk[k]);
            end
            if (got - blend > 1.0 || blend - got > 1.0) failures++;
          end
        end

    checks++;
    if (n_blocks != 3 * (W / 8) * (H / 8)) failures++;
    $display("blocks processed: %0d; R,G,B of pixel (1,1): host %0d,%0d,%0d -> %0d,%0d,%0d",
             n_blocks, host_rgb[pix(1, 1, 0)], host_rgb[pix(1, 1, 1)], host_rgb[pix(1, 1, 2)],
             out_rgb[pix(1, 1, 0)], out_rgb[pix(1, 1, 1)], out_rgb[pix(1, 1, 2)]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
