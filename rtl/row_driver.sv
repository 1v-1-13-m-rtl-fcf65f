// row_driver: word-line driver of the pixel array.
//
// Decodes the row address produced by the controller's address generator
// into one word line. The word line is raised only while the controller asks
// for an access (en), so no row is touched between operations.
//
// Interface: row (binary address), en, wl (one-hot, all zero when en is low
// or row is out of range). Purely combinational.
// From the source design: a row driver on the word lines. This design's own
// choice: a plain binary decoder, since the insides are not described.
module row_driver #(
  parameter int unsigned ROWS = slm_pkg::ROWS,
  parameter int unsigned AW   = $clog2(ROWS)
) (
  input  logic [AW-1:0]   row,
  input  logic            en,
  output logic [ROWS-1:0] wl
);
  always_comb begin
    wl = '0;
    for (int r = 0; r < ROWS; r++) begin
      if (en && (row == AW'(r))) wl[r] = 1'b1;
    end
  end
endmodule
