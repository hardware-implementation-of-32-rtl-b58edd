// tb_sine_rom_a: checks all 16 words of sub-ROM A: sin A and cos A against round(2047 sin/cos(pi/2 (A + 0.5) / 16)),
// with the expected values computed here in floating point.
module tb_sine_rom_a;
  localparam real HALF_PI = 1.5707963267948966;
  logic [3:0] addr;
  logic [10:0] sin_a, cos_a;
  int unsigned checks = 0, failures = 0;

  sine_rom_a dut (.addr(addr), .sin_a(sin_a), .cos_a(cos_a));

  function automatic int rnd(input real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_s, exp_c;
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      #1;
          exp_s = rnd(2047.0 * $sin(HALF_PI * (i + 0.5) / 16.0));
          exp_c = rnd(2047.0 * $cos(HALF_PI * (i + 0.5) / 16.0));
          checks++;
          if (int'(sin_a) != exp_s) begin failures++; $display("FAIL sin A[%0d] = %0d, expected %0d", i, sin_a, exp_s); end
          checks++;
          if (int'(cos_a) != exp_c) begin failures++; $display("FAIL cos A[%0d] = %0d, expected %0d", i, cos_a, exp_c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
