// slm_controller: controller, data buffers and internal address generator of
// the backplane chip.
//
// The chip has no address pins. A start pulse begins an operation on the
// whole array and an internal generator walks all ROWS x MUX word addresses,
// row by row and within a row over the MUX column groups, one word per clock:
// 9600 cycles for a VGA bitplane, read or write. Writing: every cycle one
// 32-bit word is taken from the data pins into the input buffer and written
// into the array on the next cycle. Reading (used for debug and test): every
// cycle one word is read and put on the data pins through the output buffer.
// While the array is loaded the global Hold is low, so all electrodes sit at
// ground; Hold goes high on the cycle the last word is written and stays high
// (display) until the next start.
//
// Interface and timing (start sampled at rising edge E0):
//   write: word k (k = 0 .. WORDS-1) must be on data_i before edge E0+1+k;
//          it is stored at edge E0+2+k; hold rises at edge E0+1+WORDS.
//   read:  word k is on data_o, with data_oe high, from edge E0+2+k.
//   re selects read (1) or write (0) and is sampled with start. A start
//   while busy is ignored. Hold falls at any start.
// From the source design: sequential internal addressing, 9600 cycles per
// operation, Hold raised right after loading. This design's own choices:
// the start/re protocol, the one-cycle input and output buffers, dropping
// Hold for a read, and the row-major word order.
module slm_controller
#(
  parameter int unsigned ROWS = slm_pkg::ROWS,
  parameter int unsigned IO_W = slm_pkg::IO_W,
  parameter int unsigned MUX  = slm_pkg::MUX,
  parameter int unsigned RAW  = $clog2(ROWS),
  parameter int unsigned CAW  = $clog2(MUX)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            re,
  input  logic [IO_W-1:0] data_i,
  output logic [IO_W-1:0] data_o,
  output logic            data_oe,
  output logic            hold,     // global Hold, 1 = display
  output logic            busy,
  // array access, driven from the access register stage
  output logic [RAW-1:0]  acc_row,
  output logic [CAW-1:0]  acc_col,
  output logic            acc_en,   // word line / column decoder enable
  output logic            acc_we,   // write (else read)
  output logic [IO_W-1:0] acc_data, // write data
  input  logic [IO_W-1:0] rdata     // read data from the column mux
);
  slm_pkg::op_e   op;
  logic [RAW-1:0] row;
  logic [CAW-1:0] col;
  logic           acc_last;
  logic           last;

  assign last = (row == RAW'(ROWS - 1)) && (col == CAW'(MUX - 1));
  assign busy = (op != slm_pkg::OP_IDLE) || acc_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op       <= slm_pkg::OP_IDLE;
      row      <= '0;
      col      <= '0;
      acc_en   <= 1'b0;
      acc_we   <= 1'b0;
      acc_row  <= '0;
      acc_col  <= '0;
      acc_data <= '0;
      acc_last <= 1'b0;
      data_o   <= '0;
      data_oe  <= 1'b0;
      hold     <= 1'b0;
    end else begin
      // address generator and input buffer
      acc_en <= 1'b0;
      unique case (op)
        slm_pkg::OP_IDLE: begin
          if (start) begin
            op   <= re ? slm_pkg::OP_READ : slm_pkg::OP_WRITE;
            row  <= '0;
            col  <= '0;
            hold <= 1'b0;
          end
        end
        slm_pkg::OP_WRITE, slm_pkg::OP_READ: begin
          acc_en   <= 1'b1;
          acc_we   <= (op == slm_pkg::OP_WRITE);
          acc_row  <= row;
          acc_col  <= col;
          acc_data <= data_i;
          acc_last <= last;
          if (col == CAW'(MUX - 1)) begin
            col <= '0;
            row <= row + 1'b1;
          end else begin
            col <= col + 1'b1;
          end
          if (last) op <= slm_pkg::OP_IDLE;
        end
        default: op <= slm_pkg::OP_IDLE;
      endcase

      // output buffer and Hold
      data_oe <= acc_en && !acc_we;
      data_o  <= (acc_en && !acc_we) ? rdata : '0;
      if (acc_en && acc_we && acc_last) hold <= 1'b1;
    end
  end

  // The array is never displayed while it is being accessed.
  a_no_hold_during_access: assert property (@(posedge clk) disable iff (!rst_n)
    acc_en |-> !hold);
endmodule
