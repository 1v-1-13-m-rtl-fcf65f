// gray_lut: calibration look-up table from gray level to pulse code.
//
// The light intensity of the liquid crystal is not linear in the pulse code
// (LC response time, the fixed loading time of each bitplane, and the
// rms relation between pulse width and intensity). The table maps each of
// the 2^GRAY_W gray levels to the CODE_W-bit pulse code that gives the
// wanted intensity; it is filled from a measurement of the panel through the
// write port. After reset it holds a straight line from CODE_MIN to CODE_MAX:
//   code(g) = CODE_MIN + (g * (CODE_MAX - CODE_MIN)) / (2^GRAY_W - 1)
// CODE_MIN = 1024 because codes below it give too little display time to
// change the light at all.
//
// Timing: write at the rising edge; read is combinational (distributed RAM).
// From the source design: 8-bit gray to 12-bit pulse code, the LUT idea and
// the 1024 lower limit. This design's own choice: the reset content and the
// write port.
module gray_lut #(
  parameter int unsigned GRAY_W   = slm_pkg::GRAY_W,
  parameter int unsigned CODE_W   = slm_pkg::N_BP,
  parameter int unsigned CODE_MIN = 1024,
  parameter int unsigned CODE_MAX = (1 << CODE_W) - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [GRAY_W-1:0] waddr,
  input  logic [CODE_W-1:0] wdata,
  input  logic [GRAY_W-1:0] gray,
  output logic [CODE_W-1:0] code
);
  localparam int unsigned N = 1 << GRAY_W;

  logic [CODE_W-1:0] table_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < N; g++) begin
        table_q[g] <= CODE_W'(CODE_MIN + (g * (CODE_MAX - CODE_MIN)) / (N - 1));
      end
    end else if (we) begin
      table_q[waddr] <= wdata;
    end
  end

  assign code = table_q[gray];
endmodule
