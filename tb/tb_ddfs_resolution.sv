// tb_ddfs_resolution: the finest frequency step of the synthesizer.
//
// With FCW = 1 the accumulator gains one unit of 2^-32 of a cycle per
// clock (0.029 Hz at 125 MHz), so the 14-bit phase must stay at 0 for
// exactly 2^18 steps and then step to 1. The word is loaded at reset; its
// first step is t0 = 4, so S(t) = t - 4 and phase 1 first appears in cycle
// 4 + 2^18 + 10. Every cycle until one Clk/4 group past that point is
// checked, then FCW = 0xFFFFFFFF (one unit backwards per clock) is loaded
// and the phase must fall back to 0 after the same number of steps.
module tb_ddfs_resolution;
  import ddfs_pkg::*;
  localparam int STEPS = 1 << (N_ACC - PHASE_W);   // 2^18 steps per phase LSB
  logic               clk = 0, rst;
  logic [N_ACC-1:0]   fcw;
  logic               fcw_load, fcw_busy, phase_valid;
  logic [PHASE_W-1:0] phase;
  logic [AMP_W-1:0]   amp;
  logic [MAG_W-1:0]   amp_mag;
  int unsigned checks = 0, failures = 0;
  int          cycle;

  ddfs_top dut (.clk(clk), .rst(rst), .fcw(fcw), .fcw_load(fcw_load), .fcw_busy(fcw_busy),
                .phase(phase), .phase_valid(phase_valid), .amp(amp), .amp_mag(amp_mag));

  always #4 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_phase(input int want);
    checks++;
    if (int'(phase) != want) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: phase %0d expected %0d", cycle, phase, want);
    end
  endtask

  initial begin
    int first_one, t1, first_zero;
    rst = 1; fcw = 32'd1; fcw_load = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0; fcw_load = 1; cycle = 0;      // strobe in cycle 0 -> t0 = 4
    first_one = 4 + STEPS + PA_LATENCY;
    for (; cycle < first_one + 8; cycle++) begin
      if (cycle == 1) fcw_load = 0;
      if (cycle >= 11) expect_phase(cycle < first_one ? 0 : 1);
      @(posedge clk); #1;
    end
    // Now go backwards one unit per step. With the strobe in this cycle the
    // new word counts from t1 = 4 * ceil((cycle + 2) / 4). S(t1) = t1 - 4,
    // and after (t1 - 4) - STEPS + 1 backward steps S = STEPS - 1, phase 0.
    fcw = 32'hFFFF_FFFF; fcw_load = 1;
    t1 = ((cycle + 2 + 3) / 4) * 4;
    first_zero = t1 + (t1 - 4 - STEPS + 1) + PA_LATENCY;
    @(posedge clk); #1 cycle++; fcw_load = 0;
    for (; cycle < first_zero + 8; cycle++) begin
      expect_phase(cycle < first_zero ? 1 : 0);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
