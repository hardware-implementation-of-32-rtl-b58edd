// phase_accumulator: 32-bit pipelined phase accumulator producing one
// truncated 14-bit phase per clock.
//
// The accumulator S(t+1) = S(t) + FCW (mod 2^32) is cut into four 8-bit
// slices. The two lower slices (bits 7:0 and 15:8) are ordinary pipelined
// accumulators, each one modified Brent-Kung adder and an 8-bit register;
// the carry of slice 0 reaches slice 1 through one flip-flop, so slice 1
// works one step behind. Their bits are not part of the output (phase
// truncation); only the carries of slice 1 matter. Those carries are
// collected four at a time in a 4-bit register ("4-DFF"), each carry
// written into its own bit and left there until the Clk/4 tick. The two
// upper slices (bits 23:16 and 31:24) are parallel_adder slices: on every
// Clk/4 tick each advances four steps at once, taking the four carries of
// the slice below and registering four carries for the slice above. The
// four results of bits 23:18 (6 bits each) are delayed one Clk/4 cycle to
// line up with the four results of bits 31:24 (8 bits each); two 4:1
// multiplexers stepped by the Clk/4 phase count then emit the four
// samples one per clock, and the concatenation is registered as
// phase = S[31:18].
//
// Paths into the parallel slices: their state, FCW byte and (for the top
// slice) carries change only on the Clk/4 tick, so those paths have four
// clocks. The collected carry of step 4g+j was written 4-j clocks before the
// tick; the last one feeds only the carry-in of the fourth adder, one adder
// delay like the lower slices.
//
// Timing: with cycle 0 the first clock after reset, the phase output in
// cycle t + PA_LATENCY (10) is bits 31:18 of S(t), the accumulator after t
// steps; phase_valid rises with S(1). The FCW is loaded through
// gated_preskew (see there): a new word applies from a step that is a
// multiple of four, and fcw must be held while fcw_busy is high.
// The slice split, the parallel upper slices, the carry collectors and the
// Clk/4 output multiplexers follow the published accumulator; the exact
// register placement and latency are this implementation's choice.
module phase_accumulator
  import ddfs_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [N_ACC-1:0]   fcw,
  input  logic               fcw_load,
  output logic               fcw_busy,
  output logic [PHASE_W-1:0] phase,
  output logic               phase_valid
);
  localparam int unsigned MID_W = PHASE_W - SLICE_W;  // 6 phase bits from slice 2

  logic [1:0]          ph;          // Clk/4 phase count
  logic                slow_tick;   // upper slices step on ph == 1
  logic [N_ACC-1:0]    f;           // skew-loaded FCW

  slice_t              acc0, acc1, sum0, sum1;
  logic                c0_comb, c1_comb, c0_q;
  logic [GROUP-1:0]    c1_group;    // 4-DFF: carries of slice 1, step 4g+j in bit j
  logic [GROUP-1:0][MID_W-1:0]   x2, x2_d;
  logic [GROUP-1:0][SLICE_W-1:0] x3;
  logic [GROUP-1:0]    c2;
  logic [GROUP-1:0]    c3_unused;  // carries out of bit 31: the accumulator wraps
  logic [1:0]          sel;
  logic [3:0]          fill;

  assign slow_tick = (ph == 2'd1);

  // The slice structure below is written for four 8-bit slices in groups of
  // four steps.
  if (N_STAGES * SLICE_W != N_ACC || GROUP != 4 || N_STAGES != 4) begin : g_size_check
    $error("phase_accumulator is built for four 8-bit slices and groups of four");
  end

  gated_preskew u_preskew (
    .clk    (clk),
    .rst    (rst),
    .k_load (fcw_load),
    .ph     (ph),
    .fcw_in (fcw),
    .fcw_q  (f),
    .busy   (fcw_busy)
  );

  // Lower slices at the full clock rate.
  bk_adder #(.W(SLICE_W)) u_add0 (.x(acc0), .y(f[7:0]),  .cin(1'b0), .s(sum0), .cout(c0_comb));
  bk_adder #(.W(SLICE_W)) u_add1 (.x(acc1), .y(f[15:8]), .cin(c0_q), .s(sum1), .cout(c1_comb));

  always_ff @(posedge clk) begin
    if (rst) begin
      ph       <= '0;
      acc0     <= '0;
      acc1     <= '0;
      c0_q     <= 1'b0;
      c1_group <= '0;
    end else begin
      ph       <= ph + 2'd1;
      acc0     <= sum0;
      acc1     <= sum1;
      c0_q     <= c0_comb;
      c1_group[ph + 2'd3] <= c1_comb;   // carry of step (cycle - 1), slot (ph - 1) mod 4
    end
  end

  // Upper slices at Clk/4. On the tick, c1_group holds the carries of the
  // four steps of one group and c2 (registered inside the slice) those of
  // the group before, which the top slice is about to process.
  parallel_adder #(.W(SLICE_W), .OUT_W(MID_W)) u_slice2 (
    .clk (clk), .rst (rst), .en (slow_tick),
    .n   (f[23:16]), .cin (c1_group), .x (x2), .cout (c2)
  );

  parallel_adder #(.W(SLICE_W), .OUT_W(SLICE_W)) u_slice3 (
    .clk (clk), .rst (rst), .en (slow_tick),
    .n   (f[31:24]), .cin (c2), .x (x3),
    .cout (c3_unused)
  );

  // Alignment: slice 2 finished this group one Clk/4 cycle before slice 3.
  always_ff @(posedge clk) begin
    if (rst)            x2_d <= '0;
    else if (slow_tick) x2_d <= x2;
  end

  // Output multiplexers: the group registered at a tick (ph == 1) is read
  // out in the following four cycles, ph = 2, 3, 0, 1 -> samples 0..3.
  assign sel = ph + 2'd2;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase       <= '0;
      fill        <= '0;
      phase_valid <= 1'b0;
    end else begin
      phase <= {x3[sel], x2_d[sel]};
      if (fill != 4'(PA_LATENCY)) fill <= fill + 4'd1;
      phase_valid <= (fill == 4'(PA_LATENCY));
    end
  end
endmodule
