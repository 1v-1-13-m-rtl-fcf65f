// display_bridge: FPGA-side sequencer that drives the chip with
// pulse-code-modulated frames and keeps the liquid crystal DC balanced.
//
// A frame is shown as two sub-frames. In each, the N_BP bitplanes are loaded
// into the chip one after the other (start pulse, then WORDS words streamed
// from the frame buffer) and each is displayed for T_UNIT << b cycles, so the
// time a pixel's electrode is high is proportional to its pulse code. The
// second sub-frame repeats the first with every data bit inverted while the
// ito_toggle output switches the ITO electrode from +V_ITO to
// -(V_ITO - VDD): the liquid crystal sees the same |V_LC| with the opposite
// sign, so its average DC is zero. A read-back operation streams the chip's
// SRAM content out for checking.
//
// Interface:
//   run     level; while high, frames follow one another. When it drops the
//           current frame is completed, then the bridge idles.
//   rb_req  pulse while idle: read the whole array back; words come out on
//           rb_valid / rb_data in the chip's word order, then rb_done pulses.
//   frame buffer read port (fb_rbank, fb_raddr, one-cycle fb_rdata).
//   chip pins chip_rstn, chip_start, chip_re, chip_d (to the chip),
//           chip_q / chip_oe (from the chip).
//   ito_toggle 0 = first sub-frame (+V_ITO), 1 = inverted sub-frame.
//   bp, sub  the bitplane and sub-frame being loaded or displayed.
// Timing per bitplane: 1 start cycle + WORDS load cycles + T_UNIT << b
// display cycles; the chip's Hold is high for exactly T_UNIT << b cycles.
// A frame takes 2 * (N_BP * (WORDS + 1) + (2^N_BP - 1) * T_UNIT) cycles.
// From the source design: PCM with 12 bitplanes, the inverted sub-frame with
// toggled ITO, the read-out mode. This design's own choices: the bitplane
// order (LSB first), T_UNIT, and the handshake with the host.
module display_bridge #(
  parameter int unsigned IO_W   = slm_pkg::IO_W,
  parameter int unsigned WORDS  = slm_pkg::WORDS,
  parameter int unsigned N_BP   = slm_pkg::N_BP,
  parameter int unsigned T_UNIT = slm_pkg::T_UNIT,
  parameter int unsigned BW     = $clog2(N_BP),
  parameter int unsigned AW     = $clog2(WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // host
  input  logic            run,
  input  logic            rb_req,
  output logic            rb_valid,
  output logic [IO_W-1:0] rb_data,
  output logic            rb_done,
  output logic            frame_done,
  output logic [BW-1:0]   bp,
  output logic            sub,
  // frame buffer read
  output logic [BW-1:0]   fb_rbank,
  output logic [AW-1:0]   fb_raddr,
  input  logic [IO_W-1:0] fb_rdata,
  // chip
  output logic            chip_rstn,
  output logic            chip_start,
  output logic            chip_re,
  output logic [IO_W-1:0] chip_d,
  input  logic [IO_W-1:0] chip_q,
  input  logic            chip_oe,
  // ITO polarity for the DAC
  output logic            ito_toggle
);
  typedef enum logic [2:0] {
    S_IDLE, S_LOAD_START, S_LOAD, S_DISPLAY, S_RB_START, S_RB
  } state_e;

  localparam int unsigned TW = N_BP + $clog2(T_UNIT + 1);

  state_e        state;
  logic [AW:0]   cnt;     // word counter (load: next address; read: words seen)
  logic [TW-1:0] timer;

  assign chip_start = (state == S_LOAD_START) || (state == S_RB_START);
  assign chip_re    = (state == S_RB_START);
  assign chip_d     = (state == S_LOAD) ? (fb_rdata ^ {IO_W{sub}}) : '0;
  assign fb_rbank   = bp;
  assign fb_raddr   = (cnt < (AW + 1)'(WORDS)) ? cnt[AW-1:0] : '0;
  assign ito_toggle = sub;
  assign rb_valid   = (state == S_RB) && chip_oe;
  assign rb_data    = chip_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      timer      <= '0;
      bp         <= '0;
      sub        <= 1'b0;
      chip_rstn  <= 1'b0;
      frame_done <= 1'b0;
      rb_done    <= 1'b0;
    end else begin
      chip_rstn  <= 1'b1;
      frame_done <= 1'b0;
      rb_done    <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          bp  <= '0;
          sub <= 1'b0;
          if (chip_rstn && run)         state <= S_LOAD_START;
          else if (chip_rstn && rb_req) state <= S_RB_START;
        end
        S_LOAD_START: begin
          cnt   <= 1;
          state <= S_LOAD;
        end
        S_LOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == (AW + 1)'(WORDS)) begin
            state <= S_DISPLAY;
            timer <= TW'(T_UNIT) << bp;
          end
        end
        S_DISPLAY: begin
          timer <= timer - 1'b1;
          if (timer == 1) begin
            cnt <= '0;
            if (bp != BW'(N_BP - 1)) begin
              bp    <= bp + 1'b1;
              state <= S_LOAD_START;
            end else begin
              bp <= '0;
              if (!sub) begin
                sub   <= 1'b1;
                state <= S_LOAD_START;
              end else begin
                sub        <= 1'b0;
                frame_done <= 1'b1;
                state      <= run ? S_LOAD_START : S_IDLE;
              end
            end
          end
        end
        S_RB_START: begin
          cnt   <= '0;
          state <= S_RB;
        end
        S_RB: begin
          if (chip_oe) begin
            cnt <= cnt + 1'b1;
            if (cnt == (AW + 1)'(WORDS - 1)) begin
              rb_done <= 1'b1;
              state   <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The chip is only started from a start state, and never twice in a row.
  a_start_single: assert property (@(posedge clk) disable iff (!rst_n)
    chip_start |=> !chip_start);
endmodule
