// tb_row_driver: every one of the 480 row addresses, with the enable high
// and low, must raise exactly its own word line (or none).
module tb_row_driver;
  localparam int ROWS = 480;
  logic [8:0] row;
  logic en;
  logic [ROWS-1:0] wl;
  int checks = 0, failures = 0;

  row_driver dut (.row, .en, .wl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 512; r++) begin
      for (int e = 0; e < 2; e++) begin
        logic [ROWS-1:0] exp;
        row = 9'(r); en = e[0];
        exp = '0;
        if (e == 1 && r < ROWS) exp[r] = 1'b1;
        #1;
        checks++;
        if (wl !== exp) begin failures++; $display("row %0d en %0d wrong", r, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
