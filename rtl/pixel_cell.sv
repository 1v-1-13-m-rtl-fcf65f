// pixel_cell: logic model of a group of the 9T SRAM pixel cells that share a
// word line (one row, or one cell with N = 1).
//
// Each cell is a 6T SRAM bit plus an electrode driver. While the array is
// being loaded the driver holds the bottom electrode V_P at ground; once the
// global Hold is given the driver passes the stored bit to V_P (V_P = VDD
// for a 1, GND for a 0), which together with the shifted ITO voltage sets the
// liquid crystal voltage. The cells are written like ordinary SRAM: when the
// word line is high, the cells whose bit line is driven (bl_we) take bl_d.
// Reading is through the same bit lines: q is the stored bit and is qualified
// by the word line in the array.
//
// Interface and timing: a write is taken at the rising clock edge at which
// wl and bl_we are high (the clock stands for the write pulse of the SRAM
// timing). vp follows disp and the stored bits combinationally. There is no
// reset: like SRAM, the content is undefined until written.
//
// From the source design: the storage, the gating of V_P by Hold and the
// 4-cell sharing of the pull-up (an area trick with no logic effect). This
// model's own choice: disp is the array-level Hold in display polarity
// (1 = show the data), and the clocked write.
module pixel_cell #(
  parameter int unsigned N = 1  // cells sharing this word line
) (
  input  logic         clk,
  input  logic         wl,     // word line
  input  logic [N-1:0] bl_we,  // bit line driven (column selected for write)
  input  logic [N-1:0] bl_d,   // bit line write data
  input  logic         disp,   // Hold: 0 = loading (V_P grounded), 1 = display
  output logic [N-1:0] q,      // stored bits (read through the bit lines)
  output logic [N-1:0] vp      // bottom electrode level, 1 = VDD
);
  logic [N-1:0] store;

  always_ff @(posedge clk) begin
    if (wl) store <= (store & ~bl_we) | (bl_d & bl_we);
  end

  assign q  = store;
  assign vp = disp ? store : '0;
endmodule
