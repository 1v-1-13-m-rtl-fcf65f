// pixel_array: the ROWS x COLS array of 9T pixel cells.
//
// Every row is a pixel_cell group on its own word line and its own hold line
// (the output of the daisy-chained hold driver). Columns share bit lines: a
// write stores bl_d into the cells of the selected row whose column is
// selected by the column mux; a read returns on bl_q the content of the row
// whose word line is high (the word lines are one-hot; with none high, bl_q
// is 0). vp carries every bottom electrode level.
//
// Timing: writes at the rising clock edge; bl_q and vp are combinational.
// From the source design: VGA size and the row / column organisation.
module pixel_array #(
  parameter int unsigned ROWS = slm_pkg::ROWS,
  parameter int unsigned COLS = slm_pkg::COLS
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wl,               // one-hot word lines
  input  logic [COLS-1:0] bl_we,            // columns driven for a write
  input  logic [COLS-1:0] bl_d,             // write data on the bit lines
  input  logic [ROWS-1:0] hold_line,        // per-row Hold from the hold driver
  output logic [COLS-1:0] bl_q,             // read data on the bit lines
  output logic [COLS-1:0] vp [ROWS]         // bottom electrode of every pixel
);
  logic [COLS-1:0] row_q [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    pixel_cell #(.N(COLS)) u_row (
      .clk  (clk),
      .wl   (wl[r]),
      .bl_we(bl_we),
      .bl_d (bl_d),
      .disp (hold_line[r]),
      .q    (row_q[r]),
      .vp   (vp[r])
    );
  end

  // Bit lines: wired-OR of the selected row.
  always_comb begin
    bl_q = '0;
    for (int r = 0; r < ROWS; r++) begin
      if (wl[r]) bl_q = bl_q | row_q[r];
    end
  end

  // At most one word line may be high: two rows on the same bit lines would
  // fight on a read and both be written.
  a_one_row: assert property (@(posedge clk) $onehot0(wl));
endmodule
