// tb_pixel_cell: checks a group of 8 pixel cells against a reference model:
// writes only land with the word line high and only in driven columns, q
// returns the stored bits, and vp is the stored bits during display (Hold
// high) and all ground while loading (Hold low).
module tb_pixel_cell;
  localparam int N = 8;
  logic clk = 0;
  logic wl, disp;
  logic [N-1:0] bl_we, bl_d, q, vp, model;
  int checks = 0, failures = 0;

  pixel_cell #(.N(N)) dut (.clk, .wl, .bl_we, .bl_d, .disp, .q, .vp);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every cell with a known value first
    wl = 1; bl_we = '1; bl_d = 8'hA5; disp = 0;
    @(posedge clk); #1;
    model = 8'hA5;
    for (int i = 0; i < 400; i++) begin
      wl    = $urandom_range(0, 1) == 1;
      bl_we = N'($urandom);
      bl_d  = N'($urandom);
      disp  = $urandom_range(0, 1) == 1;
      #1;
      checks++;
      if (vp !== (disp ? model : '0)) begin
        failures++; $display("vp mismatch %h vs %h", vp, disp ? model : '0);
      end
      @(posedge clk); #1;
      if (wl) model = (model & ~bl_we) | (bl_d & bl_we);
      checks++;
      if (q !== model) begin failures++; $display("q mismatch %h vs %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
