// ddfs_pkg: sizes shared by the blocks of the 32-bit direct digital
// frequency synthesizer.
//
// The accumulator is 32 bits wide and is cut into four 8-bit slices
// (L = 4 pipeline stages of B = 8 bits). The two upper slices run a
// four-way parallel "progression of states" adder at a quarter of the
// clock rate, so GROUP = 4 accumulator steps are handled per slow cycle.
// The phase handed to the sine lookup is the top 14 bits of the
// accumulator; the lookup produces an 11-bit quarter-wave magnitude and a
// 12-bit output word. All of these numbers follow the published design;
// the amplitude full scale of 2047 is this implementation's choice.
package ddfs_pkg;
  localparam int unsigned N_ACC    = 32;  // phase accumulator width
  localparam int unsigned SLICE_W  = 8;   // bits per pipeline stage
  localparam int unsigned N_STAGES = 4;   // L, pipeline stages
  localparam int unsigned GROUP    = 4;   // steps per Clk/4 cycle
  localparam int unsigned PHASE_W  = 14;  // truncated phase, OUT[31:18]
  localparam int unsigned MAG_W    = 11;  // quarter-wave magnitude bits
  localparam int unsigned AMP_W    = 12;  // output word to the DAC
  localparam int unsigned SUB_W    = 4;   // address bits of each sub-ROM

  // Cycles from the accumulator state S(t) (the value after t steps) to
  // the clock in which its truncated phase is on the accumulator output.
  localparam int unsigned PA_LATENCY = 10;

  typedef logic [SLICE_W-1:0] slice_t;
endpackage
