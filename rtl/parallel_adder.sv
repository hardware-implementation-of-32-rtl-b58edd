// parallel_adder: one 8-bit slice of the accumulator that advances four
// steps per slow (Clk/4) cycle by the "progression of states" method.
//
// With state X and FCW slice N held constant, four modified Brent-Kung
// adders compute the next four states side by side:
//   X1 = X + N  + c0
//   X2 = X + 2N + c0 + c1         (2N: N shifted up one place)
//   X3 = X2 + N + c2
//   X4 = X + 4N + c0 + c1 + c2 + c3   (4N: N shifted up two places)
// where c0..c3 are the carries that the slice below produced in those four
// steps. The low places freed by shifting N up hold the carry sum from the
// slice below and each adder's carry in takes the last carry. X4 is fed
// back as the new state. The FCW bits shifted out of the slice are counted
// back into each adder's wrap count, and the per-step carries to the slice
// above follow as differences of those wrap counts.
//
// Timing: when en is high the state, the four results (top OUT_W bits of
// X1..X4, X1 in the lowest field) and the four carries out (cout[j] for
// step j) are registered; they stay put until the next en. The adder
// structure (four adders, shifted FCW, fed-back fourth result) follows the
// published slice; how the carries from below are merged in is this
// implementation's choice.
module parallel_adder #(
  parameter int unsigned W     = 8,
  parameter int unsigned OUT_W = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic [W-1:0]            n,
  input  logic [3:0]              cin,
  output logic [3:0][OUT_W-1:0]   x,
  output logic [3:0]              cout
);
  logic [W-1:0] state;
  logic [W-1:0] x1, x2, x3, x4;
  logic         k1, k3, r2, r4;
  logic [1:0]   csum3;   // c0 + c1 + c2
  logic [1:0]   w2;      // wraps of X over two steps
  logic [2:0]   w4;      // wraps of X over four steps
  logic         k2, k4;

  assign csum3 = 2'(cin[0]) + 2'(cin[1]) + 2'(cin[2]);

  bk_adder #(.W(W)) u_add1 (.x(state), .y(n),                     .cin(cin[0]), .s(x1), .cout(k1));
  bk_adder #(.W(W)) u_add2 (.x(state), .y({n[W-2:0], cin[0]}),    .cin(cin[1]),   .s(x2), .cout(r2));
  bk_adder #(.W(W)) u_add3 (.x(x2),    .y(n),                     .cin(cin[2]),   .s(x3), .cout(k3));
  bk_adder #(.W(W)) u_add4 (.x(state), .y({n[W-3:0], csum3}),     .cin(cin[3]),   .s(x4), .cout(r4));

  always_comb begin
    w2 = 2'(r2) + 2'(n[W-1]);
    w4 = 3'(r4) + {1'b0, n[W-1], n[W-2]};
    k2 = 1'(w2 - 2'(k1));
    k4 = 1'(w4 - 3'(w2) - 3'(k3));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= '0;
      x     <= '0;
      cout  <= '0;
    end else if (en) begin
      state <= x4;
      x     <= {x4[W-1 -: OUT_W], x3[W-1 -: OUT_W], x2[W-1 -: OUT_W], x1[W-1 -: OUT_W]};
      cout  <= {k4, k3, k2, k1};
    end
  end
endmodule
