// col_decoder: column decoder of the pixel array.
//
// Turns the column-group address (which of the 20 columns each data pin is
// connected to) into the one-hot select of the column mux.
//
// Interface: sel (binary), en, col_sel (one-hot, zero when en is low or sel
// is out of range). Purely combinational.
// From the source design: a column decoder feeding a x20 column mux. This
// design's own choice: a plain binary decoder.
module col_decoder #(
  parameter int unsigned MUX = slm_pkg::MUX,
  parameter int unsigned SW  = $clog2(MUX)
) (
  input  logic [SW-1:0]  sel,
  input  logic           en,
  output logic [MUX-1:0] col_sel
);
  always_comb begin
    col_sel = '0;
    for (int s = 0; s < MUX; s++) begin
      if (en && (sel == SW'(s))) col_sel[s] = 1'b1;
    end
  end
endmodule
