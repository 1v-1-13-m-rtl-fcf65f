// tb_frame_buffer: 3 banks x 16 words x 8 bits. Random writes and reads are
// compared with a reference memory; read data must appear exactly one cycle
// after the address (block RAM timing), and out-of-range addresses must
// neither write nor read.
module tb_frame_buffer;
  localparam int NB = 3, DEPTH = 16, W = 8;
  logic clk = 0, we;
  logic [1:0] wbank, rbank;
  logic [3:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [NB][DEPTH];
  logic [W-1:0] exp_q;
  int checks = 0, failures = 0;

  frame_buffer #(.N_BANKS(NB), .DEPTH(DEPTH), .W(W)) dut (
    .clk, .we, .wbank, .waddr, .wdata, .rbank, .raddr, .rdata
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wbank = 0; waddr = 0; wdata = 0; rbank = 0; raddr = 0;
    // fill all banks
    for (int b = 0; b < NB; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we = 1; wbank = 2'(b); waddr = 4'(a); wdata = W'($urandom); model[b][a] = wdata;
      end
    @(negedge clk); we = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1;
      wbank = 2'($urandom_range(0, 3));   // bank 3 does not exist
      waddr = 4'($urandom); wdata = W'($urandom);
      rbank = 2'($urandom_range(0, NB - 1));
      raddr = 4'($urandom);
      exp_q = model[rbank][raddr];        // read-before-write at the same edge
      if (we && wbank < NB) model[wbank][waddr] = wdata;
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata !== exp_q) begin failures++; $display("read %0d/%0d: %h vs %h", rbank, raddr, rdata, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
