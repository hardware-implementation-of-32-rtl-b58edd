// tb_parallel_adder: checks the four-step parallel accumulator slice
// against a step-by-step reference: X <- X + N + c_j, carry out = bit 8.
// Random FCW slices and random carry patterns from the slice below are
// applied on randomly spaced enable cycles, including the corner FCWs
// 0x00, 0xFF and 0x80. Two instances are checked: full 8-bit outputs and
// the 6-bit outputs used for bits 23:18 of the accumulator.
module tb_parallel_adder;
  localparam int unsigned W = 8;
  logic             clk = 0, rst;
  logic             en;
  logic [W-1:0]     n;
  logic [3:0]       cin;
  logic [3:0][7:0]  x8;
  logic [3:0][5:0]  x6;
  logic [3:0]       cout8, cout6;
  int unsigned      checks = 0, failures = 0;
  int unsigned      cycles = 0;

  parallel_adder #(.W(W), .OUT_W(8)) dut8 (.clk(clk), .rst(rst), .en(en), .n(n), .cin(cin), .x(x8), .cout(cout8));
  parallel_adder #(.W(W), .OUT_W(6)) dut6 (.clk(clk), .rst(rst), .en(en), .n(n), .cin(cin), .x(x6), .cout(cout6));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned xr, t;
    logic [3:0][7:0] ex;
    logic [3:0]      ec;
    rst = 1; en = 0; n = '0; cin = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    xr = 0;
    for (int it = 0; it < 20000; it++) begin
      case (it % 50)
        0: n = 8'hFF;
        1: n = 8'h00;
        2: n = 8'h80;
        default: n = W'($urandom);
      endcase
      cin = 4'($urandom);
      if (it % 97 == 5) cin = 4'hF;
      en  = 1;
      for (int j = 0; j < 4; j++) begin
        t = xr + n + cin[j];
        ec[j] = t[W];
        xr = t % (1 << W);
        ex[j] = W'(xr);
      end
      @(posedge clk);
      #1 en = 0;
      checks++;
      if (x8 !== ex || cout8 !== ec) begin
        failures++;
        if (failures < 10) $display("FAIL it %0d n=%h cin=%b: got %h/%b expected %h/%b", it, n, cin, x8, cout8, ex, ec);
      end
      checks++;
      if (cout6 !== ec || x6 !== {ex[3][7:2], ex[2][7:2], ex[1][7:2], ex[0][7:2]}) begin
        failures++;
        if (failures < 10) $display("FAIL 6-bit it %0d", it);
      end
      // Idle cycles: outputs must hold while en is low.
      n = W'($urandom); cin = 4'($urandom);
      repeat ($urandom_range(0, 2)) begin
        @(posedge clk); #1;
        checks++;
        if (x8 !== ex || cout8 !== ec) begin
          failures++;
          $display("FAIL outputs changed without en");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
