// column_mux: 20-to-1 column multiplexer between the 32 data pins and the
// 640 bit lines.
//
// Data pin i is connected to columns i, IO_W + i, 2*IO_W + i, ... ; the
// one-hot col_sel picks which one. So word s of a row carries the contiguous
// columns s*IO_W .. s*IO_W + IO_W - 1, bit i being column s*IO_W + i.
// For a write, the selected columns' bit lines are driven with the data word
// (bl_we marks them); for a read, the selected columns' bit lines are routed
// back to the data pins.
//
// Interface: col_sel (one-hot), we, wdata -> bl_we, bl_d; bl_q -> rdata.
// Purely combinational.
// From the source design: 32 data pins, 20-to-1 multiplexing. This design's
// own choice: the interleaved pin-to-column assignment above.
module column_mux #(
  parameter int unsigned IO_W = slm_pkg::IO_W,
  parameter int unsigned MUX  = slm_pkg::MUX,
  parameter int unsigned COLS = IO_W * MUX
) (
  input  logic [MUX-1:0]  col_sel,
  input  logic            we,
  input  logic [IO_W-1:0] wdata,
  output logic [COLS-1:0] bl_we,
  output logic [COLS-1:0] bl_d,
  input  logic [COLS-1:0] bl_q,
  output logic [IO_W-1:0] rdata
);
  always_comb begin
    rdata = '0;
    for (int s = 0; s < MUX; s++) begin
      bl_we[s*IO_W +: IO_W] = {IO_W{we & col_sel[s]}};
      bl_d [s*IO_W +: IO_W] = wdata;
      if (col_sel[s]) rdata = rdata | bl_q[s*IO_W +: IO_W];
    end
  end
endmodule
