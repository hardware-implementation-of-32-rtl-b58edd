// tb_phase_to_amplitude: drives all 16384 phases, one per clock, and checks
// each output one clock later against a floating-point model of the
// converter: quarter-wave folding, sin A + cos A sin B + cos A sin C with
// table values from $sin/$cos, products rounded to the output LSB, clamp to
// 0..2047, and the offset-binary output coding. It also checks that the
// magnitude is within 4 LSB of the exact 2047 sin(pi/2 (k + 0.5) / 4096),
// and counts folded quarters, negative half-waves and clamped sums.
module tb_phase_to_amplitude;
  import ddfs_pkg::*;
  localparam real HALF_PI = 1.5707963267948966;
  logic               clk = 0, rst;
  logic [PHASE_W-1:0] phase;
  logic [AMP_W-1:0]   amp;
  logic [MAG_W-1:0]   mag;
  int unsigned checks = 0, failures = 0, cycles = 0;
  int unsigned folded = 0, negative = 0, clamped = 0;
  real worst = 0.0;

  phase_to_amplitude dut (.clk(clk), .rst(rst), .phase(phase), .amp(amp), .mag(mag));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // floor((v + 1024) / 2048) for signed v
  function automatic int scale(input int v);
    return int'($floor((real'(v) + 1024.0) / 2048.0));
  endfunction

  function automatic void model(input int ph, output int exp_mag, output int exp_amp,
                                output bit was_clamped);
    int k, a, b, c, sa, ca, sb, sc, total;
    k = ph % 4096;
    if (ph[12]) k = 4095 - k;
    a = k / 256; b = (k / 16) % 16; c = k % 16;
    sa = rnd(2047.0 * $sin(HALF_PI * (a + 0.5) / 16.0));
    ca = rnd(2047.0 * $cos(HALF_PI * (a + 0.5) / 16.0));
    sb = rnd(2047.0 * $sin(HALF_PI * 16.0 * (b - 8) / 4096.0));
    sc = rnd(2047.0 * $sin(HALF_PI * (c + 0.5) / 4096.0));
    total = sa + scale(ca * sb) + scale(ca * sc);
    was_clamped = (total > 2047) || (total < 0);
    exp_mag = (total > 2047) ? 2047 : (total < 0) ? 0 : total;
    exp_amp = ph[13] ? 2047 - exp_mag : 2048 + exp_mag;
  endfunction

  initial begin
    int exp_mag, exp_amp, prev, k;
    bit cl;
    real err;
    rst = 1; phase = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // The phase applied in one cycle is registered at the next edge, so the
    // output of phase p is checked right after that edge (one-clock latency).
    for (int p = 0; p < (1 << PHASE_W); p++) begin
      phase = PHASE_W'(p);
      @(posedge clk);
      #1;
      begin
        prev = p;
        model(prev, exp_mag, exp_amp, cl);
        checks++;
        if (int'(mag) != exp_mag || int'(amp) != exp_amp) begin
          failures++;
          if (failures < 10) $display("FAIL phase %0d: mag %0d amp %0d, expected %0d %0d", prev, mag, amp, exp_mag, exp_amp);
        end
        k = prev % 4096;
        if (prev & 4096) begin k = 4095 - k; folded++; end
        if (prev & 8192) negative++;
        if (cl) clamped++;
        err = real'(mag) - 2047.0 * $sin(HALF_PI * (k + 0.5) / 4096.0);
        if (err < 0.0) err = -err;
        if (err > worst) worst = err;
        checks++;
        if (err > 4.0) begin
          failures++;
          $display("FAIL accuracy at phase %0d: error %f", prev, err);
        end
      end
    end
    $display("worst magnitude error %f LSB; folded %0d negative %0d clamped %0d", worst, folded, negative, clamped);
    checks++;
    if (folded == 0 || negative == 0 || clamped == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
