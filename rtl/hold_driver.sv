// hold_driver: daisy-chained Hold buffers along the row direction.
//
// Switching the Hold of all 307,200 pixels at once draws a large current
// spike. The buffers are therefore chained: the global Hold enters at the
// first rows and reaches the last rows a few stages later, so the rows switch
// in groups spread over about 50 ns, on the rising edge (start of display)
// and on the falling edge (start of the next load) alike.
//
// Here each chain stage is one clock register: rows are split into STAGES
// equal groups, group g (rows g*ROWS/STAGES ...) sees hold_in delayed by
// g+1 cycles. With 5 stages at 100 MHz the spread is 50 ns, as in the source
// design. Row 0 is the start of the chain (L1), row ROWS-1 the end (Ln).
//
// Interface: hold_in (global Hold from the controller), hold_line (per row).
// Reset clears the chain (no row displays).
// From the source design: the daisy chain and its 50 ns spread. This design's
// own choice: clocked stages instead of analog buffer delays, and the stage
// count derived from the spread and the 100 MHz clock.
module hold_driver #(
  parameter int unsigned ROWS   = slm_pkg::ROWS,
  parameter int unsigned STAGES = slm_pkg::HOLD_STG
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            hold_in,
  output logic [ROWS-1:0] hold_line
);
  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= '0;
    else        chain <= {chain[STAGES-2:0], hold_in};
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      hold_line[r] = chain[(r * STAGES) / ROWS];
    end
  end
endmodule
