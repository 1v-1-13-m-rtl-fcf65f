// tb_hold_driver: a Hold pulse is applied to the default 480-row chain.
// Row r must follow the input after 1 + floor(5 r / 480) cycles on both
// edges, so the first and last row switch 4 cycles apart and the whole
// array within 5 cycles (50 ns at 100 MHz).
module tb_hold_driver;
  localparam int ROWS = 480, STAGES = 5;
  logic clk = 0, rst_n = 0, hold_in = 0;
  logic [ROWS-1:0] hold_line;
  int checks = 0, failures = 0;
  int rise [ROWS];
  int fall [ROWS];
  int cyc = 0;

  hold_driver dut (.clk, .rst_n, .hold_in, .hold_line);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [ROWS-1:0] prev;
  always @(negedge clk) begin
    for (int r = 0; r < ROWS; r++) begin
      if (hold_line[r] && !prev[r]) rise[r] = cyc;
      if (!hold_line[r] && prev[r]) fall[r] = cyc;
    end
    prev = hold_line;
  end

  initial begin
    prev = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (hold_line !== '0) begin failures++; $display("not clear after reset"); end
    @(negedge clk); hold_in = 1;
    begin
      int t0;
      t0 = cyc;
      repeat (20) @(negedge clk);
      hold_in = 0;
      repeat (20) @(negedge clk);
      for (int r = 0; r < ROWS; r++) begin
        int d;
        d = 1 + (r * STAGES) / ROWS;
        checks++;
        if (rise[r] - t0 != d) begin failures++; $display("row %0d rise delay %0d", r, rise[r] - t0); end
        checks++;
        if (fall[r] - (t0 + 20) != d) begin failures++; $display("row %0d fall delay %0d", r, fall[r] - t0 - 20); end
      end
      checks++;
      if (rise[ROWS-1] - rise[0] != STAGES - 1) begin failures++; $display("spread wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
