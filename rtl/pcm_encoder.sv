// pcm_encoder: turns gray-scale pixels into the bitplanes of pulse-code
// modulation.
//
// Pixels arrive one per cycle in raster order (row by row, left to right).
// Each 8-bit gray level is mapped through the calibration table (gray_lut)
// to a 12-bit pulse code. The codes of IO_W consecutive pixels are gathered;
// bit b of each code forms the bitplane-b word for those pixels (bit i of the
// word = pixel i of the group, i.e. column s*IO_W + i of the row, matching
// the chip's column mux). When a group is complete its N_BP words are
// written into the frame buffer, bank b = bitplane b, word address = group
// number (row * MUX + s), one word per cycle.
//
// Interface: valid/ready pixel stream; first marks the first pixel of a
// frame and restarts the word address. The frame-buffer write port
// (fb_we, fb_bank, fb_addr, fb_data) and the LUT write port are brought out.
// frame_done pulses when the last word of a frame has been written.
// Timing: the N_BP words of a group are written on the N_BP cycles after
// its last pixel is taken; ready drops only when a group would complete
// before the previous one has been written (never when IO_W >= N_BP).
// From the source design: 8-bit gray, LUT to a 12-bit code, 12 bitplanes,
// 32-bit words. This design's own choices: the packing order and stream
// handshake.
module pcm_encoder #(
  parameter int unsigned GRAY_W = slm_pkg::GRAY_W,
  parameter int unsigned N_BP   = slm_pkg::N_BP,
  parameter int unsigned IO_W   = slm_pkg::IO_W,
  parameter int unsigned WORDS  = slm_pkg::WORDS,
  parameter int unsigned BW     = $clog2(N_BP),
  parameter int unsigned AW     = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // pixel stream
  input  logic              pix_valid,
  input  logic              pix_first,
  input  logic [GRAY_W-1:0] pix_gray,
  output logic              pix_ready,
  // calibration table write
  input  logic              lut_we,
  input  logic [GRAY_W-1:0] lut_addr,
  input  logic [N_BP-1:0]   lut_data,
  // frame buffer write
  output logic              fb_we,
  output logic [BW-1:0]     fb_bank,
  output logic [AW-1:0]     fb_addr,
  output logic [IO_W-1:0]   fb_data,
  output logic              frame_done
);
  localparam int unsigned PW = $clog2(IO_W);

  logic [N_BP-1:0]  code;
  logic [IO_W-1:0]  plane [N_BP];   // words being gathered
  logic [IO_W-1:0]  outbuf [N_BP];  // words being written
  logic [PW-1:0]    pos;            // next pixel position in the group
  logic [AW-1:0]    grp;            // word address of the group being gathered
  logic [AW-1:0]    out_addr;
  logic             out_last;
  logic [BW:0]      flush_cnt;      // words of outbuf still to write
  logic             take, group_end;

  gray_lut #(.GRAY_W(GRAY_W), .CODE_W(N_BP)) u_lut (
    .clk, .rst_n, .we(lut_we), .waddr(lut_addr), .wdata(lut_data),
    .gray(pix_gray), .code
  );

  // Position of this pixel: a frame start restarts at position 0.
  logic [PW-1:0] cur_pos;
  logic [AW-1:0] cur_grp;
  assign cur_pos   = pix_first ? '0 : pos;
  assign cur_grp   = pix_first ? '0 : grp;
  assign group_end = (cur_pos == PW'(IO_W - 1));
  assign pix_ready = !(group_end && flush_cnt > 1);
  assign take      = pix_valid && pix_ready;

  assign fb_we   = (flush_cnt != 0);
  assign fb_bank = BW'(N_BP - flush_cnt);
  assign fb_addr = out_addr;
  assign fb_data = outbuf[fb_bank];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos        <= '0;
      grp        <= '0;
      out_addr   <= '0;
      out_last   <= 1'b0;
      flush_cnt  <= '0;
      frame_done <= 1'b0;
      for (int b = 0; b < N_BP; b++) begin
        plane[b]  <= '0;
        outbuf[b] <= '0;
      end
    end else begin
      frame_done <= 1'b0;
      if (flush_cnt != 0) begin
        flush_cnt <= flush_cnt - 1'b1;
        if (flush_cnt == 1 && out_last) frame_done <= 1'b1;
      end
      if (take) begin
        for (int b = 0; b < N_BP; b++) plane[b][cur_pos] <= code[b];
        if (group_end) begin
          for (int b = 0; b < N_BP; b++) begin
            outbuf[b]          <= plane[b];
            outbuf[b][cur_pos] <= code[b];
          end
          flush_cnt <= (BW + 1)'(N_BP);
          out_addr  <= cur_grp;
          out_last  <= (cur_grp == AW'(WORDS - 1));
          pos       <= '0;
          grp       <= (cur_grp == AW'(WORDS - 1)) ? '0 : cur_grp + 1'b1;
        end else begin
          pos <= cur_pos + 1'b1;
          grp <= cur_grp;
        end
      end
    end
  end
endmodule
