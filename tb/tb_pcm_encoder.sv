// tb_pcm_encoder: 8-pixel words, 6 words per frame, 12 bitplanes. Pixels are
// offered with random gaps; every frame-buffer write is captured and each
// bitplane word must equal bit b of the pulse codes of its 8 pixels, taken
// from an independent copy of the calibration line (plus a few table
// writes). With 8-bit words and 12 bitplanes the input must stall; the test
// counts the stalls and the frame-done pulses.
module tb_pcm_encoder;
  localparam int IO_W = 8, WORDS = 6, N_BP = 12, NPIX = IO_W * WORDS;
  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, pix_first = 0, pix_ready;
  logic [7:0] pix_gray = 0;
  logic lut_we = 0;
  logic [7:0] lut_addr = 0;
  logic [11:0] lut_data = 0;
  logic fb_we, frame_done;
  logic [3:0] fb_bank;
  logic [2:0] fb_addr;
  logic [IO_W-1:0] fb_data;
  logic [IO_W-1:0] got [N_BP][WORDS];
  int lut [256];
  int pix [NPIX];
  int checks = 0, failures = 0, stalls = 0, dones = 0, writes = 0;

  pcm_encoder #(.IO_W(IO_W), .WORDS(WORDS), .N_BP(N_BP)) dut (
    .clk, .rst_n, .pix_valid, .pix_first, .pix_gray, .pix_ready,
    .lut_we, .lut_addr, .lut_data, .fb_we, .fb_bank, .fb_addr, .fb_data, .frame_done
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && fb_we) begin got[fb_bank][fb_addr] <= fb_data; writes++; end
    if (frame_done) dones++;
    if (pix_valid && !pix_ready) stalls++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_frame();
    for (int p = 0; p < NPIX; p++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin pix_valid = 0; @(negedge clk); end
      pix_valid = 1; pix_first = (p == 0); pix_gray = 8'(pix[p]);
      @(posedge clk);
      while (!pix_ready) @(posedge clk);
    end
    @(negedge clk); pix_valid = 0; pix_first = 0;
    repeat (20) @(negedge clk);
  endtask

  task automatic check_frame();
    for (int b = 0; b < N_BP; b++)
      for (int w = 0; w < WORDS; w++) begin
        logic [IO_W-1:0] exp;
        for (int i = 0; i < IO_W; i++) exp[i] = lut[pix[w*IO_W + i]][b];
        checks++;
        if (got[b][w] !== exp) begin failures++; $display("bp %0d word %0d: %h vs %h", b, w, got[b][w], exp); end
      end
  endtask

  initial begin
    for (int g = 0; g < 256; g++) lut[g] = 1024 + (g * 3071) / 255;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      if (f == 1) begin
        for (int i = 0; i < 10; i++) begin
          @(negedge clk);
          lut_we = 1; lut_addr = 8'($urandom_range(0, 15)); lut_data = 12'($urandom);
          lut[lut_addr] = int'(lut_data);
        end
        @(negedge clk); lut_we = 0;
      end
      for (int p = 0; p < NPIX; p++) pix[p] = (f == 1) ? $urandom_range(0, 15) : $urandom_range(0, 255);
      send_frame();
      check_frame();
    end
    checks++;
    if (writes != 2 * N_BP * WORDS) begin failures++; $display("writes %0d", writes); end
    checks++;
    if (dones != 2) begin failures++; $display("frame_done %0d", dones); end
    checks++;
    if (stalls == 0) begin failures++; $display("never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
