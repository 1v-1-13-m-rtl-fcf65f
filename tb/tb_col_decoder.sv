// tb_col_decoder: all 32 codes of the 5-bit column-group address, with the
// enable high and low; only codes 0..19 may select a column group.
module tb_col_decoder;
  localparam int MUX = 20;
  logic [4:0] sel;
  logic en;
  logic [MUX-1:0] col_sel;
  int checks = 0, failures = 0;

  col_decoder dut (.sel, .en, .col_sel);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 32; s++) begin
      for (int e = 0; e < 2; e++) begin
        logic [MUX-1:0] exp;
        sel = 5'(s); en = e[0];
        exp = '0;
        if (e == 1 && s < MUX) exp[s] = 1'b1;
        #1;
        checks++;
        if (col_sel !== exp) begin failures++; $display("sel %0d en %0d wrong", s, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
