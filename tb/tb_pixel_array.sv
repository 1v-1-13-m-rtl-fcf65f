// tb_pixel_array: a 6 x 16 array is written word line by word line with
// random column enables, then read back row by row through the bit lines;
// the electrode outputs are compared with a reference under random per-row
// Hold patterns.
module tb_pixel_array;
  localparam int ROWS = 6, COLS = 16;
  logic clk = 0;
  logic [ROWS-1:0] wl, hold_line;
  logic [COLS-1:0] bl_we, bl_d, bl_q;
  logic [COLS-1:0] vp [ROWS];
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  pixel_array #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .wl, .bl_we, .bl_d, .hold_line, .bl_q, .vp);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hold_line = '0;
    // initialise every row
    for (int r = 0; r < ROWS; r++) begin
      wl = '0; wl[r] = 1; bl_we = '1; bl_d = COLS'($urandom); model[r] = bl_d;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 300; i++) begin
      int r;
      r = $urandom_range(0, ROWS - 1);
      wl = '0;
      if ($urandom_range(0, 3) != 0) wl[r] = 1;
      bl_we = COLS'($urandom); bl_d = COLS'($urandom);
      hold_line = ROWS'($urandom);
      #1;
      // read: bl_q shows the selected row (or 0)
      checks++;
      if (bl_q !== (wl[r] ? model[r] : '0)) begin
        failures++; $display("read row %0d: %h vs %h", r, bl_q, model[r]);
      end
      for (int k = 0; k < ROWS; k++) begin
        checks++;
        if (vp[k] !== (hold_line[k] ? model[k] : '0)) begin
          failures++; $display("vp row %0d: %h", k, vp[k]);
        end
      end
      @(posedge clk); #1;
      if (wl[r]) model[r] = (model[r] & ~bl_we) | (bl_d & bl_we);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
