// tb_slm_controller: the controller on a 4 row x 3 group x 8 bit array
// model. A write streams 12 words; the test checks that word k lands at row
// k/3, group k%3 at edge E0+2+k, that Hold rises at edge E0+1+WORDS and
// falls at the next start, and that a read returns the words in order with
// data_oe from edge E0+2+k. A start while busy must be ignored.
module tb_slm_controller;
  localparam int ROWS = 4, MUX = 3, IO_W = 8, WORDS = ROWS * MUX;
  logic clk = 0, rst_n = 0, start = 0, re = 0;
  logic [IO_W-1:0] data_i = '0, data_o, acc_data, rdata;
  logic data_oe, hold, busy, acc_en, acc_we;
  logic [1:0] acc_row, acc_col;
  logic [IO_W-1:0] mem [WORDS];
  logic [IO_W-1:0] pattern [WORDS];
  int wr_cycle [WORDS];
  int checks = 0, failures = 0;
  int cyc = 0;

  slm_controller #(.ROWS(ROWS), .IO_W(IO_W), .MUX(MUX)) dut (
    .clk, .rst_n, .start, .re, .data_i, .data_o, .data_oe, .hold, .busy,
    .acc_row, .acc_col, .acc_en, .acc_we, .acc_data, .rdata
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // array model
  assign rdata = (acc_en && !acc_we) ? mem[int'(acc_row) * MUX + int'(acc_col)] : '0;
  always @(posedge clk) begin
    if (acc_en && acc_we) begin
      mem[int'(acc_row) * MUX + int'(acc_col)] <= acc_data;
      wr_cycle[int'(acc_row) * MUX + int'(acc_col)] <= cyc;
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, hold_rise;
    for (int k = 0; k < WORDS; k++) begin pattern[k] = IO_W'($urandom); mem[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- write
    @(negedge clk); start = 1; re = 0;
    @(posedge clk); e0 = cyc;  // cycle number of edge E0
    @(negedge clk); start = 0;
    for (int k = 0; k < WORDS; k++) begin
      data_i = pattern[k];
      if (k == 3) start = 1;  // ignored while busy
      @(negedge clk);
      start = 0;
    end
    hold_rise = -1;
    for (int i = 0; i < 5; i++) begin
      if (hold && hold_rise < 0) hold_rise = cyc;
      @(negedge clk);
    end
    for (int k = 0; k < WORDS; k++) begin
      checks++;
      if (mem[k] !== pattern[k]) begin failures++; $display("word %0d: %h vs %h", k, mem[k], pattern[k]); end
      checks++;
      if (wr_cycle[k] != e0 + 2 + k) begin failures++; $display("word %0d written at %0d, want %0d", k, wr_cycle[k], e0 + 2 + k); end
    end
    checks++;
    if (hold_rise != e0 + 2 + WORDS) begin
      // hold sampled after the edge: the edge number is hold_rise - 1
      failures++; $display("hold rose after edge %0d, want %0d", hold_rise - 1, e0 + 1 + WORDS);
    end
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    // ---- read
    @(negedge clk); start = 1; re = 1;
    @(posedge clk); e0 = cyc;
    @(negedge clk); start = 0; re = 0;
    checks++;
    if (hold) begin failures++; $display("hold not dropped by start"); end
    begin
      int k;
      k = 0;
      for (int i = 0; i < WORDS + 4; i++) begin
        if (data_oe) begin
          checks++;
          // observed after edge E0+2+k, when the cycle counter reads E0+3+k
          if (data_o !== pattern[k] || cyc != e0 + 3 + k) begin
            failures++; $display("read %0d: %h at %0d", k, data_o, cyc);
          end
          k++;
        end
        @(negedge clk);
      end
      checks++;
      if (k != WORDS) begin failures++; $display("read %0d words", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
