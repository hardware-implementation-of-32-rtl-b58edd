// tb_phase_accumulator: checks the pipelined phase accumulator against a
// plain 32-bit reference accumulator, clock by clock.
//
// The reference keeps S(t), the accumulator after t steps from reset
// (cycle 0 is the first clock after reset). A word loaded with a strobe
// seen at the end of cycle k governs every step from t0, the first
// multiple of four with t0 - 1 > k. Every cycle from 11 on, phase must equal
// S(cycle - 10)[31:18], which also checks the 10-cycle latency and the
// rise of phase_valid. Words include 0x1FFFFFFF and 0x0DFFFFFF, all-ones,
// tiny and random words, reloaded many times. The test counts reloads,
// groups with carries into bits 16 and 24 (including several carries in
// one group) and 32-bit wrap-arounds, and fails if any never happened.
module tb_phase_accumulator;
  import ddfs_pkg::*;
  localparam int unsigned CYCLES = 30000;
  logic               clk = 0, rst;
  logic [N_ACC-1:0]   fcw;
  logic               fcw_load, fcw_busy, phase_valid;
  logic [PHASE_W-1:0] phase;
  int unsigned checks = 0, failures = 0;
  int unsigned n_loads = 0, n_c16 = 0, n_c16_multi = 0, n_c24 = 0, n_wrap = 0;
  logic [N_ACC-1:0] s_ref [CYCLES+1];

  phase_accumulator dut (.clk(clk), .rst(rst), .fcw(fcw), .fcw_load(fcw_load),
                         .fcw_busy(fcw_busy), .phase(phase), .phase_valid(phase_valid));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_ACC-1:0] pick_word(input int i);
    case (i % 8)
      0: return 32'h1FFF_FFFF;
      1: return 32'h0DFF_FFFF;
      2: return 32'hFFFF_FFFF;
      3: return 32'h0000_0001;
      4: return 32'h0001_0000;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic [N_ACC-1:0] cur_f, next_f;
    int t0, k, hold, nl;
    logic [N_ACC:0] wide;
    rst = 1; fcw = '0; fcw_load = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cur_f = '0; next_f = '0; t0 = -1; hold = 20; nl = 0;
    s_ref[0] = '0;
    for (int c = 0; c < CYCLES; c++) begin
      // now inside cycle c
      if (t0 == c) cur_f = next_f;
      // reference step c: S(c+1) = S(c) + F(c)
      wide = {1'b0, s_ref[c]} + {1'b0, cur_f};
      s_ref[c+1] = wide[N_ACC-1:0];
      if (wide[N_ACC]) n_wrap++;
      // stimulus
      fcw_load = 0;
      if (!fcw_busy && hold == 0 && t0 < c) begin
        next_f = pick_word(nl++);
        fcw = next_f;
        fcw_load = 1;
        k = c;
        t0 = ((k + 2 + 3) / 4) * 4;
        hold = 40 + $urandom_range(0, 400);
        n_loads++;
      end else if (hold > 0) begin
        hold--;
      end
      // output check
      checks++;
      if (phase_valid != (c >= 11)) begin
        failures++;
        $display("FAIL cycle %0d: phase_valid %0d", c, phase_valid);
      end
      if (c >= 11) begin
        checks++;
        if (phase != s_ref[c-10][N_ACC-1 -: PHASE_W]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: phase %h expected %h", c, phase, s_ref[c-10][N_ACC-1 -: PHASE_W]);
        end
      end
      // mechanism counters (slow tick is ph == 1)
      if (dut.slow_tick) begin
        if (dut.c1_group != 0) n_c16++;
        if ($countones(dut.c1_group) > 1) n_c16_multi++;
        if (dut.c2 != 0) n_c24++;
      end
      @(posedge clk);
      #1;
    end
    $display("loads %0d, groups with carry into bit 16: %0d (several: %0d), into bit 24: %0d, wraps %0d",
             n_loads, n_c16, n_c16_multi, n_c24, n_wrap);
    checks++;
    if (n_loads < 2 || n_c16 == 0 || n_c16_multi == 0 || n_c24 == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
