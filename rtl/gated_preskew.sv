// gated_preskew: loads the 32-bit frequency control word into the four
// byte registers of the pipelined accumulator, each at its own skewed time.
//
// A conventional pipelined accumulator delays FCW byte i through i extra
// registers so that each slice sees a new word when the step it belongs to
// reaches it (N(L+1)/2 = 80 flip-flops for N = 32, L = 4). Here the word is
// held on the input instead and a pulse travelling down a chain of L = 4
// flip-flops enables each byte register once, at the right clock, so only
// N + L = 36 flip-flops are used. The first flip-flop is set by the K
// strobe (k_load) and waits for a four-step group boundary, because the
// two upper slices work on groups of four steps:
//   d0: set by k_load, fires in the cycle with ph == 3 (loads byte 0)
//   d1: one clock later (loads byte 1, whose slice runs one step behind)
//   d2: one clock later (loads byte 2 before that slice's next Clk/4 tick)
//   d3: clocked only on the Clk/4 tick (ph == 1); loads byte 3 on the
//       following tick, just before the top slice starts the new group.
// The new word therefore governs every slice from the same step t0, the
// first multiple of four after the strobe is seen.
//
// Interface: fcw_in must stay unchanged while busy is high (at most 9
// clocks after k_load); k_load is ignored while busy. ph is the Clk/4
// phase count of the accumulator. The gated clocks of the published
// design are written as clock enables; the exact enable cycles are this
// implementation's choice, derived from the accumulator's pipeline.
module gated_preskew
  import ddfs_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              k_load,
  input  logic [1:0]        ph,
  input  logic [N_ACC-1:0]  fcw_in,
  output logic [N_ACC-1:0]  fcw_q,
  output logic              busy
);
  logic d0, d1, d2, d3;
  logic fire0, slow_tick;

  assign slow_tick = (ph == 2'd1);
  assign fire0     = d0 && (ph == 2'd3);
  assign busy      = d0 | d1 | d2 | d3;

  always_ff @(posedge clk) begin
    if (rst) begin
      d0 <= 1'b0;
      d1 <= 1'b0;
      d2 <= 1'b0;
      d3 <= 1'b0;
    end else begin
      if (k_load && !busy) d0 <= 1'b1;
      else if (fire0)      d0 <= 1'b0;
      d1 <= fire0;
      d2 <= d1;
      if (slow_tick) d3 <= d2;
    end
  end

  // The 32 preskew flip-flops, one enable per byte.
  always_ff @(posedge clk) begin
    if (rst) begin
      fcw_q <= '0;
    end else begin
      if (fire0)            fcw_q[0*SLICE_W +: SLICE_W] <= fcw_in[0*SLICE_W +: SLICE_W];
      if (d1)               fcw_q[1*SLICE_W +: SLICE_W] <= fcw_in[1*SLICE_W +: SLICE_W];
      if (d2)               fcw_q[2*SLICE_W +: SLICE_W] <= fcw_in[2*SLICE_W +: SLICE_W];
      if (d3 && slow_tick)  fcw_q[3*SLICE_W +: SLICE_W] <= fcw_in[3*SLICE_W +: SLICE_W];
    end
  end
endmodule
