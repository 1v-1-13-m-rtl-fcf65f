// tb_slm_full: one complete frame through the whole system at its default
// size: 480 x 640 pixels, 32 data pins, 12 bitplanes, display unit of 107
// cycles, 5-stage hold chain.
//
// A 307,200-pixel gray image (a fixed arithmetic pattern) goes through the
// default calibration line into the frame buffer; one frame is displayed and
// the array is read back. Each time all hold lines have come up for a
// bitplane, every electrode is compared with bit b of its pixel's pulse code
// (inverted in the second sub-frame); every display but the last (which
// lasts until the next chip operation) must last T_UNIT << b cycles; the frame must take 2 * (12 * 9601 + 4095 * 107) = 1,106,754
// cycles, inside the 1,111,111 cycles of a 90 frame/s period at 100 MHz;
// and every read-back word must hold the inverted bitplane 11.
module tb_slm_full;
  localparam int ROWS = 480, IO_W = 32, MUX = 20, COLS = 640, N_BP = 12;
  localparam int T_UNIT = 107, WORDS = ROWS * MUX, NPIX = ROWS * COLS;
  localparam int FRAME_CYCLES = 2 * (N_BP * (WORDS + 1) + 4095 * T_UNIT);

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, pix_first = 0, pix_ready, enc_frame_done;
  logic [7:0] pix_gray = 0;
  logic lut_we = 0;
  logic [7:0] lut_addr = 0;
  logic [11:0] lut_data = 0;
  logic run = 0, frame_done, sub, rb_req = 0, rb_valid, rb_done, ito_toggle, hold, chip_busy;
  logic [3:0] bp;
  logic [IO_W-1:0] rb_data;
  logic [ROWS-1:0] hold_line;
  logic [COLS-1:0] vp [ROWS];

  logic [11:0] code [ROWS][COLS];
  int checks = 0, failures = 0, cyc = 0;
  int n_disp = 0, hold_start = 0, frame_start = -1, frame_end = -1, rb_words = 0, n_rb = 0;
  logic all_prev = 0, hold_prev = 0, busy_prev = 0;

  slm_system dut (
    .clk, .rst_n, .pix_valid, .pix_first, .pix_gray, .pix_ready, .enc_frame_done,
    .lut_we, .lut_addr, .lut_data, .run, .frame_done, .bp, .sub, .rb_req, .rb_valid,
    .rb_data, .rb_done, .ito_toggle, .hold, .chip_busy, .hold_line, .vp
  );

  always #5 clk = ~clk;

  function automatic int gray_of(int r, int c);
    return (r * 3 + c * 5 + ((r ^ c) & 15)) % 256;
  endfunction

  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      // busy rises one edge after the frame's first start cycle began
      if (chip_busy && !busy_prev && frame_start < 0 && run) frame_start = cyc - 1;
      if (frame_done && frame_end < 0) frame_end = cyc;
      // display durations of the global Hold
      if (hold && !hold_prev) hold_start = cyc;
      // the last display of the frame lasts until the next operation
      if (!hold && hold_prev && n_disp > 0 && n_disp < 2 * N_BP) begin
        automatic int b = (n_disp - 1) % N_BP;
        checks++;
        if (cyc - hold_start != T_UNIT << b) begin
          failures++; $display("display %0d lasted %0d cycles", n_disp - 1, cyc - hold_start);
        end
      end
      // every electrode, once all rows display
      if (&hold_line && !all_prev && frame_end < 0) begin
        automatic int b = n_disp % N_BP;
        automatic int s = n_disp / N_BP;
        int bad;
        bad = 0;
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            checks++;
            if (vp[r][c] !== (code[r][c][b] ^ s[0])) bad++;
          end
        if (bad != 0) begin failures += bad; $display("display %0d: %0d electrodes wrong", n_disp, bad); end
        checks++;
        if (ito_toggle !== s[0]) begin failures++; $display("ITO polarity wrong in display %0d", n_disp); end
        n_disp++;
      end
      if (rb_valid) begin
        automatic int r = rb_words / MUX, s = rb_words % MUX;
        logic [IO_W-1:0] exp;
        for (int i = 0; i < IO_W; i++) exp[i] = !code[r][s * IO_W + i][N_BP - 1];
        checks++;
        if (rb_data !== exp) begin failures++; if (failures < 10) $display("read-back word %0d", rb_words); end
        rb_words++;
      end
      if (rb_done) n_rb++;
      all_prev  = &hold_line;
      hold_prev = hold;
      busy_prev = chip_busy;
    end
  end

  initial begin
    repeat (2500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) code[r][c] = 12'(1024 + (gray_of(r, c) * 3071) / 255);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPIX; p++) begin
      pix_valid = 1; pix_first = (p == 0); pix_gray = 8'(gray_of(p / COLS, p % COLS));
      @(posedge clk);
      while (!pix_ready) @(posedge clk);
      @(negedge clk);
    end
    pix_valid = 0; pix_first = 0;
    wait (enc_frame_done);
    repeat (3) @(negedge clk);
    run = 1;
    repeat (10) @(negedge clk);
    run = 0;                      // the started frame is completed
    wait (frame_done);
    repeat (20) @(negedge clk);
    rb_req = 1; @(negedge clk); rb_req = 0;
    wait (n_rb == 1);
    repeat (3) @(negedge clk);
    checks++;
    if (n_disp != 2 * N_BP) begin failures++; $display("%0d displays", n_disp); end
    checks++;
    if (frame_end - frame_start != FRAME_CYCLES) begin
      failures++; $display("frame took %0d cycles, want %0d", frame_end - frame_start, FRAME_CYCLES);
    end
    checks++;
    if (FRAME_CYCLES > 1111111) begin failures++; $display("slower than 90 frames/s at 100 MHz"); end
    checks++;
    if (rb_words != WORDS) begin failures++; $display("read back %0d words", rb_words); end
    $display("frame: %0d cycles (%0d ns at 100 MHz)", frame_end - frame_start, 10 * (frame_end - frame_start));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
