// tb_column_mux: with the default 32 pins and 20 groups, pin i of group s
// must reach column 32*s + i in both directions, and only the selected
// group's bit lines may be driven during a write.
module tb_column_mux;
  localparam int IO_W = 32, MUX = 20, COLS = 640;
  logic [MUX-1:0] col_sel;
  logic we;
  logic [IO_W-1:0] wdata, rdata;
  logic [COLS-1:0] bl_we, bl_d, bl_q;
  int checks = 0, failures = 0;

  column_mux dut (.col_sel, .we, .wdata, .bl_we, .bl_d, .bl_q, .rdata);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int s;
      s = $urandom_range(0, MUX - 1);
      col_sel = '0; col_sel[s] = 1'b1;
      we = $urandom_range(0, 1) == 1;
      wdata = $urandom;
      for (int w = 0; w < COLS / 32; w++) bl_q[w*32 +: 32] = $urandom;
      #1;
      for (int c = 0; c < COLS; c++) begin
        logic sel_col;
        sel_col = (c / IO_W) == s;
        checks++;
        if (bl_we[c] !== (we && sel_col)) begin
          failures++; $display("bl_we col %0d wrong", c);
        end
        if (sel_col) begin
          checks++;
          if (bl_d[c] !== wdata[c % IO_W]) begin failures++; $display("bl_d col %0d", c); end
          checks++;
          if (rdata[c % IO_W] !== bl_q[c]) begin failures++; $display("rdata col %0d", c); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
