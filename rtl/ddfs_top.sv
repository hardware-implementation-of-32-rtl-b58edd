// ddfs_top: 32-bit direct digital frequency synthesizer.
//
// A frequency control word FCW sets the output frequency
// F_out = FCW / 2^32 * F_clk (resolution F_clk / 2^32, 0.029 Hz at
// 125 MHz). phase_accumulator adds FCW once per clock in a pipelined,
// partly four-way-parallel 32-bit accumulator and hands the top 14 bits
// of the phase to phase_to_amplitude, which maps them to a 12-bit sine
// sample through a 368-bit compressed quarter-wave table. The analog
// back end (DAC and low-pass filter) is outside: amp is its input word.
//
// Interface and timing:
//   fcw, fcw_load  load a new word; fcw must stay stable while fcw_busy is
//                  high. The word takes effect from the next accumulator
//                  step that is a multiple of four.
//   phase          bits 31:18 of the accumulator S(t) in cycle t + 10
//                  (cycle 0 = first clock after reset); phase_valid is
//                  high from the first valid sample on.
//   amp, amp_mag   the sine sample of that phase one clock later, as a
//                  12-bit offset-binary word and as the 11-bit
//                  quarter-wave magnitude (the rectified waveform).
// The block structure follows the published synthesizer; reset and the
// load handshake are this implementation's choices.
module ddfs_top
  import ddfs_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [N_ACC-1:0]   fcw,
  input  logic               fcw_load,
  output logic               fcw_busy,
  output logic [PHASE_W-1:0] phase,
  output logic               phase_valid,
  output logic [AMP_W-1:0]   amp,
  output logic [MAG_W-1:0]   amp_mag
);
  phase_accumulator u_pa (
    .clk         (clk),
    .rst         (rst),
    .fcw         (fcw),
    .fcw_load    (fcw_load),
    .fcw_busy    (fcw_busy),
    .phase       (phase),
    .phase_valid (phase_valid)
  );

  phase_to_amplitude u_pac (
    .clk   (clk),
    .rst   (rst),
    .phase (phase),
    .amp   (amp),
    .mag   (amp_mag)
  );
endmodule
