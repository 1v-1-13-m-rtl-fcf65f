// tb_display_bridge: the bridge with 8-bit words, 5 words per bitplane,
// 3 bitplanes and a 2-cycle display unit, against a frame-buffer model and a
// model of the chip pins. For two frames it checks the order of the loads
// (bitplanes 0,1,2 then the same inverted), every streamed word (the frame
// buffer word, inverted in the second sub-frame), the ITO polarity during
// each load, and the spacing of the start pulses: WORDS + 1 + T_UNIT << b
// cycles, i.e. a display time of T_UNIT << b. Then it reads the array back
// through the chip model and checks the words and rb_done.
module tb_display_bridge;
  localparam int IO_W = 8, WORDS = 5, N_BP = 3, T_UNIT = 2;
  logic clk = 0, rst_n = 0, run = 0, rb_req = 0;
  logic rb_valid, rb_done, frame_done, sub;
  logic [IO_W-1:0] rb_data, fb_rdata, chip_d, chip_q;
  logic [1:0] bp, fb_rbank;
  logic [2:0] fb_raddr;
  logic chip_rstn, chip_start, chip_re, chip_oe, ito_toggle;
  logic [IO_W-1:0] fb [N_BP][WORDS];
  logic [IO_W-1:0] chip_mem [WORDS];
  int checks = 0, failures = 0;
  int cyc = 0, frames = 0, rb_words = 0, rb_dones = 0;

  display_bridge #(.IO_W(IO_W), .WORDS(WORDS), .N_BP(N_BP), .T_UNIT(T_UNIT)) dut (
    .clk, .rst_n, .run, .rb_req, .rb_valid, .rb_data, .rb_done, .frame_done, .bp, .sub,
    .fb_rbank, .fb_raddr, .fb_rdata,
    .chip_rstn, .chip_start, .chip_re, .chip_d, .chip_q, .chip_oe, .ito_toggle
  );

  always #5 clk = ~clk;

  // frame buffer model: one-cycle read
  always @(posedge clk) fb_rdata <= (int'(fb_raddr) < WORDS) ? fb[fb_rbank][fb_raddr] : '0;

  // chip pin model
  int   st_cyc = -1, k_in = -1, rd_k = -1;
  logic st_re;
  int   load_no = 0;   // loads seen
  int   last_start = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    chip_oe <= 1'b0;
    chip_q  <= '0;
    if (rst_n && frame_done) frames++;
    if (rst_n && rb_valid) begin
      checks++;
      if (rb_data !== chip_mem[rb_words]) begin failures++; $display("readback %0d", rb_words); end
      rb_words++;
    end
    if (rst_n && rb_done) rb_dones++;
    if (rd_k >= 0) begin
      chip_oe <= 1'b1; chip_q <= chip_mem[rd_k];
      rd_k = (rd_k == WORDS - 1) ? -1 : rd_k + 1;
    end
    if (k_in >= 0) begin
      automatic int b = (load_no - 1) % N_BP;
      automatic int s = ((load_no - 1) / N_BP) % 2;
      checks++;
      if (chip_d !== (fb[b][k_in] ^ {IO_W{s[0]}})) begin
        failures++; $display("load %0d word %0d: %h", load_no, k_in, chip_d);
      end
      chip_mem[k_in] = chip_d;
      k_in = (k_in == WORDS - 1) ? -1 : k_in + 1;
    end
    if (chip_rstn && chip_start) begin
      if (chip_re) rd_k = 0;
      else begin
        automatic int b = load_no % N_BP;
        automatic int s = (load_no / N_BP) % 2;
        if (last_start >= 0) begin
          automatic int pb = (load_no - 1) % N_BP;
          checks++;
          if (cyc - last_start != WORDS + 1 + (T_UNIT << pb)) begin
            failures++; $display("load %0d after %0d cycles", load_no, cyc - last_start);
          end
        end
        checks++;
        if (int'(bp) != b || int'(sub) != s || int'(ito_toggle) != s) begin
          failures++; $display("load %0d: bp %0d sub %0d ito %0d", load_no, bp, sub, ito_toggle);
        end
        last_start = cyc;
        load_no++;
        k_in = 0;
      end
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < N_BP; b++)
      for (int w = 0; w < WORDS; w++) fb[b][w] = IO_W'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run = 1;
    wait (frames == 1);
    @(negedge clk); run = 0;
    wait (frames == 2);
    repeat (5) @(negedge clk);
    checks++;
    if (load_no != 4 * N_BP) begin failures++; $display("loads %0d", load_no); end
    // read back
    rb_req = 1; @(negedge clk); rb_req = 0;
    wait (rb_dones == 1);
    repeat (5) @(negedge clk);
    checks++;
    if (rb_words != WORDS) begin failures++; $display("read %0d words", rb_words); end
    checks++;
    if (load_no != 4 * N_BP) begin failures++; $display("extra loads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
