// tb_gated_preskew: checks when each FCW byte register of the preskew
// block takes its new value. With the strobe seen at the end of cycle k,
// the group boundary is t0, the first multiple of four after k + 1; byte 0
// must load at the end of cycle t0-1, byte 1 at t0, byte 2 at t0+1 and
// byte 3 at t0+5, with busy high from k+1 to t0+5. A strobe while busy
// must be ignored. Strobes are given at every phase of the Clk/4 count.
module tb_gated_preskew;
  import ddfs_pkg::*;
  logic              clk = 0, rst, k_load, busy;
  logic [1:0]        ph;
  logic [N_ACC-1:0]  fcw_in, fcw_q, prev_q;
  int                cycle;      // index of the current cycle (0 after reset)
  int unsigned       checks = 0, failures = 0;
  int unsigned       ignored_strobes = 0;

  gated_preskew dut (.clk(clk), .rst(rst), .k_load(k_load), .ph(ph),
                     .fcw_in(fcw_in), .fcw_q(fcw_q), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s (fcw_q=%h)", cycle, what, fcw_q);
    end
  endtask

  initial begin
    int k, t0;
    logic [N_ACC-1:0] old_w, new_w;
    rst = 1; k_load = 0; ph = 0; fcw_in = '0; cycle = -2;
    @(posedge clk); #1 cycle++;
    @(posedge clk); #1 cycle++; rst = 0;   // now in cycle 0, ph = 0
    check(fcw_q == '0 && !busy, "reset state");
    for (int trial = 0; trial < 40; trial++) begin
      // wait a random number of cycles
      repeat ($urandom_range(0, 5)) begin
        @(posedge clk); #1 cycle++; ph = 2'(cycle);
      end
      old_w = fcw_q;
      new_w = $urandom;
      fcw_in = new_w;
      k_load = 1;
      k = cycle;
      // find t0: d0 is high from k+1 and fires in a cycle c >= k+1, c%4==3
      t0 = k + 1;
      while (t0 % 4 != 0) t0++;
      if (t0 - 1 < k + 1) t0 += 4;
      @(posedge clk); #1 cycle++; ph = 2'(cycle);
      k_load = 0;
      while (cycle <= t0 + 6) begin
        // value expected after the edges that ended cycles < cycle
        logic [N_ACC-1:0] exp_q;
        exp_q = old_w;
        if (cycle > t0 - 1) exp_q[7:0]   = new_w[7:0];
        if (cycle > t0)     exp_q[15:8]  = new_w[15:8];
        if (cycle > t0 + 1) exp_q[23:16] = new_w[23:16];
        if (cycle > t0 + 5) exp_q[31:24] = new_w[31:24];
        check(fcw_q == exp_q, "byte load timing");
        check(busy == (cycle <= t0 + 5), "busy");
        // a strobe with a different word while busy must change nothing
        if (cycle == t0 + 2) begin
          k_load = 1; ignored_strobes++;
        end else begin
          k_load = 0;
        end
        @(posedge clk); #1 cycle++; ph = 2'(cycle);
      end
      k_load = 0;
      check(fcw_q == new_w, "whole word loaded");
    end
    check(ignored_strobes > 0, "strobe during busy exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
