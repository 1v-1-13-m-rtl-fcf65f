// tb_code_sweep: the pulse-code sweep. The calibration table is programmed
// so that gray level g selects code 1024 + 12 g, covering 1024 .. 4084 of
// the 12-bit range, and all 256 levels are shown, 32 per frame, on a 2 x 16 (8-bit words, 2 groups)
// array with a 1-cycle display unit. For every pixel the on-time of its
// electrode in the first sub-frame must equal its code, so the on-time grows
// by exactly 12 cycles per gray step: the drive itself is linear in the code,
// and any non-linearity of the light is left to the calibration table.
module tb_code_sweep;
  localparam int ROWS = 2, IO_W = 8, MUX = 2, COLS = IO_W * MUX, N_BP = 12;
  localparam int T_UNIT = 1, NPIX = ROWS * COLS;

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

  int ontime [256];
  int rises [ROWS];
  int base;
  int checks = 0, failures = 0, frames = 0;

  slm_system #(.ROWS(ROWS), .IO_W(IO_W), .MUX(MUX), .N_BP(N_BP), .T_UNIT(T_UNIT)) dut (
    .clk, .rst_n, .pix_valid, .pix_first, .pix_gray, .pix_ready, .enc_frame_done,
    .lut_we, .lut_addr, .lut_data, .run, .frame_done, .bp, .sub, .rb_req, .rb_valid,
    .rb_data, .rb_done, .ito_toggle, .hold, .chip_busy, .hold_line, .vp
  );

  always #5 clk = ~clk;

  always @(negedge clk) begin
    if (rst_n) begin
      if (frame_done) frames++;
      for (int r = 0; r < ROWS; r++) begin
        if (hold_line[r] && !prev_hold[r]) rises[r]++;
        if (hold_line[r] && rises[r] >= 1 && rises[r] <= N_BP)
          for (int c = 0; c < COLS; c++) if (vp[r][c]) ontime[base + r * COLS + c]++;
      end
      prev_hold <= hold_line;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev_hold = '0; base = 0;
    for (int g = 0; g < 256; g++) ontime[g] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 256; g++) begin
      @(negedge clk);
      lut_we = 1; lut_addr = 8'(g); lut_data = 12'(1024 + 12 * g);
    end
    @(negedge clk); lut_we = 0;
    for (int f = 0; f < 256 / NPIX; f++) begin
      for (int p = 0; p < NPIX; p++) begin
        @(negedge clk);
        pix_valid = 1; pix_first = (p == 0); pix_gray = 8'(f * NPIX + p);
        @(posedge clk);
        while (!pix_ready) @(posedge clk);
      end
      @(negedge clk); pix_valid = 0; pix_first = 0;
      wait (enc_frame_done);
      @(negedge clk);
      base = f * NPIX;
      for (int r = 0; r < ROWS; r++) rises[r] = 0;
      run = 1; @(negedge clk); run = 0;
      wait (frames == f + 1);
      repeat (3) @(negedge clk);
    end
    for (int g = 0; g < 256; g++) begin
      checks++;
      if (ontime[g] != (1024 + 12 * g) * T_UNIT) begin
        failures++; $display("gray %0d: on for %0d cycles", g, ontime[g]);
      end
      if (g > 0) begin
        checks++;
        if (ontime[g] - ontime[g - 1] != 12 * T_UNIT) failures++;
      end
    end
    $display("sweep: gray 0 -> %0d cycles, gray 255 -> %0d cycles", ontime[0], ontime[255]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
