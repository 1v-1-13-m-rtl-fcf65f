// frame_buffer: FPGA-side frame buffer holding one frame as bitplanes.
//
// One block RAM per bitplane (BRAM 1 .. n), each DEPTH words of W bits; a
// bitplane word is exactly what the chip takes on its data pins in one
// cycle. One write port fills the buffer (from the pulse-code encoder); one
// read port feeds the display bridge through a bank multiplexer.
//
// Timing: writes at the rising edge when we is high. Reads are synchronous
// like block RAM: rdata shows word (rbank, raddr) from the edge after the
// address is presented. An out-of-range bank or address writes nothing and
// reads 0.
// From the source design: BRAM banks, 32-bit data and the output mux. This
// design's own choice: one bank per bitplane.
module frame_buffer #(
  parameter int unsigned N_BANKS = slm_pkg::N_BP,
  parameter int unsigned DEPTH   = slm_pkg::WORDS,
  parameter int unsigned W       = slm_pkg::IO_W,
  parameter int unsigned BW      = $clog2(N_BANKS),
  parameter int unsigned AW      = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [BW-1:0] wbank,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [BW-1:0] rbank,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0]  bank_q [N_BANKS];
  logic [BW-1:0] rbank_q;

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    logic [W-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we && wbank == BW'(b) && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
      bank_q[b] <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
    end
  end

  always_ff @(posedge clk) rbank_q <= rbank;

  always_comb begin
    rdata = '0;
    for (int b = 0; b < N_BANKS; b++) begin
      if (rbank_q == BW'(b)) rdata = bank_q[b];
    end
  end
endmodule
