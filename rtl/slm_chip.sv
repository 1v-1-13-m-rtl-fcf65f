// slm_chip: the 1 V LCoS backplane chip.
//
// A VGA array of 9T SRAM pixels is written like a memory, one bitplane at a
// time, through 32 data pins and a 20-to-1 column mux, with addresses made
// on chip. When a bitplane is loaded the global Hold goes high and every
// pixel drives its stored bit onto its bottom electrode; the Hold reaches
// the rows through a daisy chain so that they do not all switch at once.
// The top (ITO) electrode voltage and its polarity come from outside.
//
// Pins: clk, rstn, start, re, data_i / data_o / data_oe (the bidirectional
// data pad split into its two directions). Observation outputs: hold (global
// Hold), busy (an operation is running), hold_line (per row), vp (every bottom electrode, 1 = VDD).
// Timing is that of slm_controller (write of word k at E0+2+k, hold at
// E0+1+WORDS) plus the hold_driver delay of 1 .. HOLD_STG cycles per row.
// From the source design: the block structure of the chip. The re pin is
// this design's own addition, standing for the read/write mode selection.
module slm_chip #(
  parameter int unsigned ROWS     = slm_pkg::ROWS,
  parameter int unsigned IO_W     = slm_pkg::IO_W,
  parameter int unsigned MUX      = slm_pkg::MUX,
  parameter int unsigned HOLD_STG = slm_pkg::HOLD_STG,
  parameter int unsigned COLS     = IO_W * MUX
) (
  input  logic            clk,
  input  logic            rstn,
  input  logic            start,
  input  logic            re,
  input  logic [IO_W-1:0] data_i,
  output logic [IO_W-1:0] data_o,
  output logic            data_oe,
  output logic            hold,
  output logic            busy,
  output logic [ROWS-1:0] hold_line,
  output logic [COLS-1:0] vp [ROWS]
);
  localparam int unsigned RAW = $clog2(ROWS);
  localparam int unsigned CAW = $clog2(MUX);

  logic [RAW-1:0]  acc_row;
  logic [CAW-1:0]  acc_col;
  logic            acc_en, acc_we;
  logic [IO_W-1:0] acc_data, rdata;
  logic [ROWS-1:0] wl;
  logic [MUX-1:0]  col_sel;
  logic [COLS-1:0] bl_we, bl_d, bl_q;

  slm_controller #(.ROWS(ROWS), .IO_W(IO_W), .MUX(MUX)) u_ctrl (
    .clk, .rst_n(rstn), .start, .re, .data_i, .data_o, .data_oe, .hold, .busy,
    .acc_row, .acc_col, .acc_en, .acc_we, .acc_data, .rdata
  );

  row_driver #(.ROWS(ROWS)) u_row (.row(acc_row), .en(acc_en), .wl);

  col_decoder #(.MUX(MUX)) u_col (.sel(acc_col), .en(acc_en), .col_sel);

  column_mux #(.IO_W(IO_W), .MUX(MUX)) u_mux (
    .col_sel, .we(acc_we), .wdata(acc_data), .bl_we, .bl_d, .bl_q, .rdata
  );

  pixel_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .wl, .bl_we, .bl_d, .hold_line, .bl_q, .vp
  );

  hold_driver #(.ROWS(ROWS), .STAGES(HOLD_STG)) u_hold (
    .clk, .rst_n(rstn), .hold_in(hold), .hold_line
  );
endmodule
