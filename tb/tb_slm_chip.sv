// tb_slm_chip: the chip with 48 rows of 640 columns (the full-size system
// test covers 480 rows). One bitplane of random words is
// written through the 32 data pins (960 words); the test checks that Hold
// rises WORDS + 1 edges after the start edge, that every row's hold line is
// high 1..5 cycles later, that every electrode then shows its written bit
// (word s of row r, bit i = column 32 s + i), that the whole array reads back
// in another 960 cycles, and that after a new start the electrodes return
// to ground while Hold is low.
module tb_slm_chip;
  localparam int ROWS = 48, IO_W = 32, MUX = 20, COLS = 640, WORDS = ROWS * MUX;
  logic clk = 0, rstn = 0, start = 0, re = 0;
  logic [IO_W-1:0] data_i = '0, data_o;
  logic data_oe, hold, busy;
  logic [ROWS-1:0] hold_line;
  logic [COLS-1:0] vp [ROWS];
  logic [IO_W-1:0] pattern [WORDS];
  int checks = 0, failures = 0, cyc = 0;

  slm_chip #(.ROWS(ROWS)) dut (.clk, .rstn, .start, .re, .data_i, .data_o, .data_oe, .hold, .busy, .hold_line, .vp);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, t_hold, t_all, nread, busy_cycles;
    for (int k = 0; k < WORDS; k++) pattern[k] = $urandom;
    repeat (2) @(negedge clk);
    rstn = 1;
    @(negedge clk); start = 1; re = 0;
    e0 = cyc;                 // the next edge is E0; after it the counter reads e0 + 1
    @(negedge clk); start = 0;
    busy_cycles = 0;
    for (int k = 0; k < WORDS; k++) begin
      data_i = pattern[k];
      if (busy) busy_cycles++;
      @(negedge clk);
    end
    t_hold = -1; t_all = -1;
    for (int i = 0; i < 10; i++) begin
      if (hold && t_hold < 0) t_hold = cyc;
      if (&hold_line && t_all < 0) t_all = cyc;
      @(negedge clk);
    end
    checks++;
    if (busy_cycles != WORDS) begin failures++; $display("busy %0d cycles", busy_cycles); end
    // Hold is seen after edge E0 + 1 + WORDS, when the counter reads e0 + 2 + WORDS
    checks++;
    if (t_hold != e0 + 2 + WORDS) begin failures++; $display("hold at %0d want %0d", t_hold, e0 + 2 + WORDS); end
    checks++;
    if (t_all != t_hold + 5) begin failures++; $display("all rows hold at %0d", t_all); end
    for (int r = 0; r < ROWS; r++)
      for (int s = 0; s < MUX; s++) begin
        checks++;
        if (vp[r][s*IO_W +: IO_W] !== pattern[r*MUX + s]) begin
          failures++; if (failures < 10) $display("vp row %0d group %0d", r, s);
        end
      end
    // read back
    @(negedge clk); start = 1; re = 1;
    @(negedge clk); start = 0; re = 0;
    nread = 0;
    for (int i = 0; i < WORDS + 5; i++) begin
      if (data_oe) begin
        checks++;
        if (data_o !== pattern[nread]) begin failures++; if (failures < 10) $display("read %0d", nread); end
        nread++;
      end
      @(negedge clk);
    end
    checks++;
    if (nread != WORDS) begin failures++; $display("read %0d words", nread); end
    // electrodes grounded while Hold is low
    checks++;
    if (hold || hold_line != '0) begin failures++; $display("hold still high"); end
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (vp[r] != '0) begin failures++; if (failures < 10) $display("row %0d not grounded", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
