// tb_ddfs_top: end-to-end test of the synthesizer at its default size.
//
// Three frequency words are loaded in turn: 0x1FFFFFFF (F_out = F_clk / 8,
// 15.625 MHz at 125 MHz), 0x0DFFFFFF, and 0x00100000 (a slow sweep through
// all 16384 phases, 4096 samples per period). Every cycle the phase is
// compared with a 32-bit reference accumulator (latency 10) and the
// amplitude one clock later with the exact offset-binary sine of that phase,
// 2048 + 2047 sin(2 pi (p + 0.5) / 2^14) above the axis and the mirror
// image below, within 4 LSB. For each word the number of upward
// mid-scale crossings of amp must match the number of accumulator
// wrap-arounds (the output frequency is FCW / 2^32 * F_clk) within one.
// The signal-to-noise ratio of the digital output is measured against a
// sine of the full 32-bit accumulator phase (so phase truncation and the
// table approximation both count as noise) and must exceed 55 dB; the
// three-term table approximation, not the 12-bit word, limits it to about
// 59-63 dB.
// Counted mechanisms: word reloads, carries into the parallel slices,
// quarter-wave folding, negative half-waves and clamped sums.
module tb_ddfs_top;
  import ddfs_pkg::*;
  localparam real TWO_PI = 6.283185307179586;
  localparam int unsigned SEG = 9000;          // cycles per frequency word
  localparam int unsigned CYCLES = 3 * SEG;
  logic               clk = 0, rst;
  logic [N_ACC-1:0]   fcw;
  logic               fcw_load, fcw_busy, phase_valid;
  logic [PHASE_W-1:0] phase;
  logic [AMP_W-1:0]   amp;
  logic [MAG_W-1:0]   amp_mag;
  int unsigned checks = 0, failures = 0;
  int unsigned n_loads = 0, n_c16 = 0, n_c24 = 0, n_fold = 0, n_neg = 0, n_clamp = 0;
  logic [N_ACC-1:0] s_ref [CYCLES+1];
  bit               wrap_ref [CYCLES+1];

  ddfs_top dut (.clk(clk), .rst(rst), .fcw(fcw), .fcw_load(fcw_load), .fcw_busy(fcw_busy),
                .phase(phase), .phase_valid(phase_valid), .amp(amp), .amp_mag(amp_mag));

  always #4 clk = ~clk;   // 125 MHz

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ideal_amp(input int p);
    real s;
    s = $sin(TWO_PI * (real'(p) + 0.5) / 16384.0);
    return (s >= 0.0) ? 2048.0 + 2047.0 * s : 2047.0 + 2047.0 * s;
  endfunction

  initial begin
    logic [N_ACC-1:0] words [3];
    logic [N_ACC-1:0] cur_f, next_f;
    logic [N_ACC:0]   wide;
    int t0, seg, prev_phase, crossings, wraps, prev_amp;
    real err, exact, sig_pow, err_pow, snr;
    words[0] = 32'h1FFF_FFFF; words[1] = 32'h0DFF_FFFF; words[2] = 32'h0010_0000;
    rst = 1; fcw = '0; fcw_load = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cur_f = '0; next_f = '0; t0 = -1; prev_phase = -1; prev_amp = 2048;
    crossings = 0; wraps = 0; sig_pow = 0.0; err_pow = 0.0;
    s_ref[0] = '0;
    for (int c = 0; c < CYCLES; c++) begin
      if (t0 == c) cur_f = next_f;
      wide = {1'b0, s_ref[c]} + {1'b0, cur_f};
      s_ref[c+1]    = wide[N_ACC-1:0];
      wrap_ref[c+1] = wide[N_ACC];
      // load a new word at the start of each segment
      fcw_load = 0;
      if (c % SEG == 0) begin
        seg = c / SEG;
        next_f = words[seg];
        fcw = next_f;
        fcw_load = 1;
        t0 = ((c + 5) / 4) * 4;
        n_loads++;
      end
      // phase: S(c - 10)[31:18]
      if (c >= 11) begin
        checks++;
        if (!phase_valid || phase != s_ref[c-10][N_ACC-1 -: PHASE_W]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: phase %h expected %h", c, phase, s_ref[c-10][N_ACC-1 -: PHASE_W]);
        end
      end
      // amplitude of the phase seen one cycle earlier
      if (prev_phase >= 0) begin
        err = real'(amp) - ideal_amp(prev_phase);
        if (err < 0.0) err = -err;
        checks++;
        if (err > 4.0) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: amp %0d for phase %0d, ideal %f", c, amp, prev_phase, ideal_amp(prev_phase));
        end
        if (prev_phase & 4096) n_fold++;
        if (prev_phase & 8192) n_neg++;
        // frequency: count upward mid-scale crossings and reference wraps,
        // away from the segment edges
        if (c % SEG > 40) begin
          if (prev_amp < 2048 && amp >= 2048) crossings++;
          if (wrap_ref[c-11]) wraps++;
        end
        prev_amp = amp;
        exact = $sin(TWO_PI * real'(s_ref[c-11]) / 4294967296.0);
        sig_pow += (2047.5 * exact) ** 2;
        err_pow += (real'(amp) - 2047.5 - 2047.5 * exact) ** 2;
      end
      if (c % SEG == SEG - 1) begin
        checks++;
        snr = 10.0 * $log10(sig_pow / err_pow);
        $display("word %h: %0d output periods, %0d accumulator wraps, SNR %0.1f dB", words[c / SEG], crossings, wraps, snr);
        checks++;
        if (snr < 55.0) begin
          failures++;
          $display("FAIL SNR below 55 dB");
        end
        sig_pow = 0.0; err_pow = 0.0;
        if (crossings > wraps + 1 || crossings + 1 < wraps) begin
          failures++;
          $display("FAIL output frequency does not match the word");
        end
        crossings = 0; wraps = 0;
      end
      if (c >= 11 && phase_valid) prev_phase = int'(phase);
      if (dut.u_pa.slow_tick) begin
        if (dut.u_pa.c1_group != 0) n_c16++;
        if (dut.u_pa.c2 != 0) n_c24++;
      end
      if (dut.u_pac.total > 2047) n_clamp++;
      @(posedge clk);
      #1;
    end
    $display("loads %0d, carry groups into bit 16 %0d / bit 24 %0d, folded %0d, negative %0d, clamped %0d",
             n_loads, n_c16, n_c24, n_fold, n_neg, n_clamp);
    checks++;
    if (n_loads < 3 || n_c16 == 0 || n_c24 == 0 || n_fold == 0 || n_neg == 0 || n_clamp == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
