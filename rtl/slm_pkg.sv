// slm_pkg: shared sizes of the 1 V LCoS backplane and its FPGA-side driver.
//
// The array is VGA (480 rows x 640 columns) and is loaded through a 32-bit
// port with 20-to-1 column multiplexing, so one full bitplane takes
// 480 * 20 = 9600 word transfers. Gray levels are 8 bits; after the
// calibration look-up they become 12-bit pulse codes, shown as 12
// binary-weighted bitplanes. These numbers are the design's defaults; every
// module also takes them as parameters so that tests can shrink the array.
package slm_pkg;
  localparam int unsigned ROWS      = 480;  // VGA rows
  localparam int unsigned COLS      = 640;  // VGA columns
  localparam int unsigned IO_W      = 32;   // data pins
  localparam int unsigned MUX       = COLS / IO_W;  // 20 columns per data pin
  localparam int unsigned WORDS     = ROWS * MUX;   // 9600 words per bitplane
  localparam int unsigned GRAY_W    = 8;    // gray-scale resolution
  localparam int unsigned N_BP      = 12;   // bitplanes = pulse-code width
  localparam int unsigned HOLD_STG  = 5;    // hold daisy-chain stages (50 ns at 100 MHz)
  // Display time of bitplane 0 in clock cycles. Bitplane b is shown for
  // T_UNIT << b cycles, so a 12-bit sub-frame shows for 4095 * T_UNIT cycles.
  // 107 fits two sub-frames of 12 bitplanes into one 90 frame/s period at
  // 100 MHz (see README).
  localparam int unsigned T_UNIT    = 107;

  // Operation the controller is running.
  typedef enum logic [1:0] {
    OP_IDLE  = 2'd0,
    OP_WRITE = 2'd1,
    OP_READ  = 2'd2
  } op_e;
endpackage
