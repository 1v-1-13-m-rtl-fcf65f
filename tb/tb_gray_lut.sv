// tb_gray_lut: after reset every gray level must map to the straight line
// 1024 + g * 3071 / 255 (computed here in integer arithmetic); then random
// calibration writes must be read back, others left unchanged.
module tb_gray_lut;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] waddr = 0, gray = 0;
  logic [11:0] wdata = 0, code;
  int model [256];
  int checks = 0, failures = 0;

  gray_lut dut (.clk, .rst_n, .we, .waddr, .wdata, .gray, .code);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 256; g++) model[g] = 1024 + (g * 3071) / 255;
    checks++;
    if (model[0] != 1024 || model[255] != 4095) failures++;
    for (int g = 0; g < 256; g++) begin
      gray = 8'(g); #1;
      checks++;
      if (int'(code) != model[g]) begin failures++; $display("g %0d: %0d vs %0d", g, code, model[g]); end
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'($urandom); wdata = 12'($urandom);
      model[waddr] = int'(wdata);
      @(negedge clk); we = 0;
      gray = 8'($urandom); #1;
      checks++;
      if (int'(code) != model[gray]) begin failures++; $display("g %0d: %0d vs %0d", gray, code, model[gray]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
