// tb_bk_adder: exhaustive check of the 8-bit modified Brent-Kung adder.
// Every x, y and carry-in combination (131072 cases) is compared with the
// integer sum x + y + cin, both the sum bits and the carry out.
module tb_bk_adder;
  localparam int unsigned W = 8;
  logic [W-1:0] x, y, s;
  logic         cin, cout;
  int unsigned  checks = 0, failures = 0;

  bk_adder #(.W(W)) dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned expect_sum;
    for (int a = 0; a < (1 << W); a++) begin
      for (int b = 0; b < (1 << W); b++) begin
        for (int c = 0; c < 2; c++) begin
          x = W'(a); y = W'(b); cin = c[0];
          #1;
          expect_sum = a + b + c;
          checks++;
          if ({cout, s} != (W+1)'(expect_sum)) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d + %0d: got %0d carry %0d", a, b, c, s, cout);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
