// tb_sine_rom_c: checks all 16 words of sub-ROM C: sin C against round(2047 sin(pi/2 (C + 0.5) / 4096)),
// with the expected values computed here in floating point.
module tb_sine_rom_c;
  localparam real HALF_PI = 1.5707963267948966;
  logic [3:0] addr;
  logic [3:0] sin_c;
  int unsigned checks = 0, failures = 0;

  sine_rom_c dut (.addr(addr), .sin_c(sin_c));

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
    int exp_s;
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      #1;
          exp_s = rnd(2047.0 * $sin(HALF_PI * (i + 0.5) / 4096.0));
          checks++;
          if (int'(sin_c) != exp_s) begin failures++; $display("FAIL sin C[%0d] = %0d, expected %0d", i, sin_c, exp_s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
