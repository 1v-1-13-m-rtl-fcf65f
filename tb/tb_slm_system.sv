// tb_slm_system: end-to-end test of the whole system on a 4 x 16 array
// (8-bit words, 2 column groups), 12 bitplanes, a 1-cycle display unit and a
// 2-stage hold chain.
//
// A few calibration entries are written, a frame of gray pixels is streamed
// in (the encoder must stall: 8-bit words against 12 bitplanes), and the
// system displays two frames. For every pixel the test counts the cycles its
// electrode is high in each sub-frame: it must be code * T_UNIT in the first
// (binary-weighted pulse-code modulation) and (4095 - code) * T_UNIT in the
// inverted second one, where code is the calibrated pulse code of the
// pixel's gray level, worked out here from the calibration line. Electrodes
// must be low whenever their row's hold line is low. After the frames the
// array is read back and must hold the inverted bitplane 11. The test counts
// each mechanism: table writes, encoder stalls, inverted sub-frames with ITO
// toggled, staggered hold lines, frames and read-back.
module tb_slm_system;
  localparam int ROWS = 4, IO_W = 8, MUX = 2, COLS = IO_W * MUX, N_BP = 12;
  localparam int T_UNIT = 1, HOLD_STG = 2, WORDS = ROWS * MUX, NPIX = ROWS * COLS;

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, pix_first = 0, pix_ready, enc_frame_done;
  logic [7:0] pix_gray = 0;
  logic lut_we = 0;
  logic [7:0] lut_addr = 0;
  logic [11:0] lut_data = 0;
  logic run = 0, frame_done, sub, rb_req = 0, rb_valid, rb_done, ito_toggle, hold, chip_busy;
  logic [3:0] bp;
  logic [IO_W-1:0] rb_data;
  logic [ROWS-1:0] hold_line, prev_hold;
  logic [COLS-1:0] vp [ROWS];

  int lut [256];
  int gray [ROWS][COLS];
  int high [2][ROWS][COLS];
  int rises [ROWS];
  int checks = 0, failures = 0;
  int n_lut = 0, n_stall = 0, n_inv = 0, n_stagger = 0, n_frames = 0, n_rb = 0, rb_words = 0;

  slm_system #(.ROWS(ROWS), .IO_W(IO_W), .MUX(MUX), .N_BP(N_BP), .T_UNIT(T_UNIT),
               .HOLD_STG(HOLD_STG)) dut (
    .clk, .rst_n, .pix_valid, .pix_first, .pix_gray, .pix_ready, .enc_frame_done,
    .lut_we, .lut_addr, .lut_data, .run, .frame_done, .bp, .sub, .rb_req, .rb_valid,
    .rb_data, .rb_done, .ito_toggle, .hold, .chip_busy, .hold_line, .vp
  );

  always #5 clk = ~clk;

  function automatic int code_of(int r, int c);
    return lut[gray[r][c]];
  endfunction

  // per-cycle observation of the panel side
  always @(negedge clk) begin
    if (rst_n) begin
      if (pix_valid && !pix_ready) n_stall++;
      if (frame_done) n_frames++;
      if (ito_toggle && chip_busy && n_inv == 0) n_inv++;
      if (hold_line != '0 && hold_line != '1) n_stagger++;
      if (rb_valid) begin
        for (int i = 0; i < IO_W; i++) begin
          automatic int r = rb_words / MUX, c = (rb_words % MUX) * IO_W + i;
          checks++;
          if (rb_data[i] !== !code_of(r, c)[N_BP-1]) begin failures++; $display("readback r%0d c%0d", r, c); end
        end
        rb_words++;
      end
      if (rb_done) n_rb++;
      for (int r = 0; r < ROWS; r++) begin
        if (hold_line[r] && !prev_hold[r]) rises[r]++;
        if (!hold_line[r] && vp[r] != '0) begin failures++; $display("row %0d driven without hold", r); end
        // the first two frames are 2 * 2 * N_BP displays; count the first frame
        if (hold_line[r] && rises[r] >= 1 && rises[r] <= 2 * N_BP)
          for (int c = 0; c < COLS; c++) if (vp[r][c]) high[(rises[r] - 1) / N_BP][r][c]++;
      end
      prev_hold <= hold_line;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev_hold = '0;
    for (int r = 0; r < ROWS; r++) begin
      rises[r] = 0;
      for (int c = 0; c < COLS; c++) begin
        high[0][r][c] = 0; high[1][r][c] = 0;
        gray[r][c] = $urandom_range(0, 255);
      end
    end
    gray[0][0] = 0; gray[0][1] = 255; gray[0][2] = 5; gray[0][3] = 6;
    for (int g = 0; g < 256; g++) lut[g] = 1024 + (g * 3071) / 255;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // calibration: a few entries moved off the straight line
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      lut_we = 1; lut_addr = 8'(i); lut_data = 12'(100 * i + 7);
      lut[i] = 100 * i + 7; n_lut++;
    end
    @(negedge clk); lut_we = 0;
    // pixels in raster order
    for (int p = 0; p < NPIX; p++) begin
      @(negedge clk);
      pix_valid = 1; pix_first = (p == 0); pix_gray = 8'(gray[p / COLS][p % COLS]);
      @(posedge clk);
      while (!pix_ready) @(posedge clk);
    end
    @(negedge clk); pix_valid = 0; pix_first = 0;
    wait (enc_frame_done);
    repeat (3) @(negedge clk);
    // display
    run = 1;
    wait (n_frames == 1);
    @(negedge clk); run = 0;
    wait (n_frames == 2);
    repeat (10) @(negedge clk);
    rb_req = 1; @(negedge clk); rb_req = 0;
    wait (n_rb == 1);
    repeat (3) @(negedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        automatic int code = code_of(r, c);
        checks++;
        if (high[0][r][c] != code * T_UNIT) begin
          failures++; $display("pixel %0d,%0d sub-frame 0: %0d cycles, code %0d", r, c, high[0][r][c], code);
        end
        checks++;
        if (high[1][r][c] != (4095 - code) * T_UNIT) begin
          failures++; $display("pixel %0d,%0d sub-frame 1: %0d cycles, code %0d", r, c, high[1][r][c], code);
        end
      end
    checks++; if (rb_words != WORDS) begin failures++; $display("read back %0d words", rb_words); end
    checks++; if (n_lut == 0)     begin failures++; $display("no table write"); end
    checks++; if (n_stall == 0)   begin failures++; $display("encoder never stalled"); end
    checks++; if (n_inv == 0)     begin failures++; $display("no inverted sub-frame"); end
    checks++; if (n_stagger == 0) begin failures++; $display("hold never staggered"); end
    checks++; if (n_frames != 2)  begin failures++; $display("frames %0d", n_frames); end
    checks++; if (n_rb != 1)      begin failures++; $display("no read-back"); end
    $display("mechanisms: lut_writes=%0d stalls=%0d inverted_subframes=%0d staggered_cycles=%0d frames=%0d readbacks=%0d",
             n_lut, n_stall, n_inv, n_stagger, n_frames, n_rb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
