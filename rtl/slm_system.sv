// slm_system: a 1 V liquid-crystal-on-silicon spatial light modulator
// backplane together with the FPGA logic that drives it.
//
// Gray-scale pixels enter in raster order, are mapped through the
// calibration table to 12-bit pulse codes and are stored as 12 bitplanes in
// the frame buffer (pcm_encoder, frame_buffer). The display bridge loads the
// bitplanes one by one into the backplane chip, lets each be displayed for a
// time proportional to its binary weight, and then repeats the whole
// sub-frame with inverted data and the ITO polarity toggled, for DC balance
// (display_bridge). The chip (slm_chip) holds one bitplane in its 9T SRAM
// pixel array and, under its global Hold, drives every pixel electrode.
//
// Ports: clk, rst_n; the pixel stream (pix_valid, pix_first, pix_gray,
// pix_ready) and the calibration table write port take the place of the
// FPGA's soft processor. run starts continuous display, rb_req reads the
// chip array back (rb_valid, rb_data, rb_done). ito_toggle selects the ITO
// voltage of the external DAC. The chip's observation outputs (hold,
// chip_busy, hold_line, vp: every bottom electrode) stand for the liquid crystal panel.
// The chip and the FPGA logic share one clock, as in the test setup.
module slm_system #(
  parameter int unsigned ROWS     = slm_pkg::ROWS,
  parameter int unsigned IO_W     = slm_pkg::IO_W,
  parameter int unsigned MUX      = slm_pkg::MUX,
  parameter int unsigned N_BP     = slm_pkg::N_BP,
  parameter int unsigned GRAY_W   = slm_pkg::GRAY_W,
  parameter int unsigned T_UNIT   = slm_pkg::T_UNIT,
  parameter int unsigned HOLD_STG = slm_pkg::HOLD_STG,
  parameter int unsigned COLS     = IO_W * MUX,
  parameter int unsigned WORDS    = ROWS * MUX
) (
  input  logic              clk,
  input  logic              rst_n,
  // pixels
  input  logic              pix_valid,
  input  logic              pix_first,
  input  logic [GRAY_W-1:0] pix_gray,
  output logic              pix_ready,
  output logic              enc_frame_done,
  // calibration table
  input  logic              lut_we,
  input  logic [GRAY_W-1:0] lut_addr,
  input  logic [N_BP-1:0]   lut_data,
  // display control
  input  logic              run,
  output logic              frame_done,
  output logic [$clog2(N_BP)-1:0] bp,
  output logic              sub,
  input  logic              rb_req,
  output logic              rb_valid,
  output logic [IO_W-1:0]   rb_data,
  output logic              rb_done,
  // ITO DAC polarity
  output logic              ito_toggle,
  // panel side of the chip
  output logic              hold,
  output logic              chip_busy,
  output logic [ROWS-1:0]   hold_line,
  output logic [COLS-1:0]   vp [ROWS]
);
  localparam int unsigned BW = $clog2(N_BP);
  localparam int unsigned AW = $clog2(WORDS);

  logic            fb_we;
  logic [BW-1:0]   fb_wbank, fb_rbank;
  logic [AW-1:0]   fb_waddr, fb_raddr;
  logic [IO_W-1:0] fb_wdata, fb_rdata;
  logic            chip_rstn, chip_start, chip_re, chip_oe;
  logic [IO_W-1:0] chip_d, chip_q;

  pcm_encoder #(.GRAY_W(GRAY_W), .N_BP(N_BP), .IO_W(IO_W), .WORDS(WORDS)) u_enc (
    .clk, .rst_n, .pix_valid, .pix_first, .pix_gray, .pix_ready,
    .lut_we, .lut_addr, .lut_data,
    .fb_we, .fb_bank(fb_wbank), .fb_addr(fb_waddr), .fb_data(fb_wdata),
    .frame_done(enc_frame_done)
  );

  frame_buffer #(.N_BANKS(N_BP), .DEPTH(WORDS), .W(IO_W)) u_fb (
    .clk, .we(fb_we), .wbank(fb_wbank), .waddr(fb_waddr), .wdata(fb_wdata),
    .rbank(fb_rbank), .raddr(fb_raddr), .rdata(fb_rdata)
  );

  display_bridge #(.IO_W(IO_W), .WORDS(WORDS), .N_BP(N_BP), .T_UNIT(T_UNIT)) u_bridge (
    .clk, .rst_n, .run, .rb_req, .rb_valid, .rb_data, .rb_done, .frame_done,
    .bp, .sub, .fb_rbank, .fb_raddr, .fb_rdata,
    .chip_rstn, .chip_start, .chip_re, .chip_d, .chip_q, .chip_oe, .ito_toggle
  );

  slm_chip #(.ROWS(ROWS), .IO_W(IO_W), .MUX(MUX), .HOLD_STG(HOLD_STG)) u_chip (
    .clk, .rstn(chip_rstn), .start(chip_start), .re(chip_re),
    .data_i(chip_d), .data_o(chip_q), .data_oe(chip_oe),
    .hold, .busy(chip_busy), .hold_line, .vp
  );
endmodule
