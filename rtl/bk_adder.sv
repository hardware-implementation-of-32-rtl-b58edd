// bk_adder: modified Brent-Kung parallel-prefix adder with carry in.
//
// Each bit forms propagate p_i = x_i ^ y_i and generate g_i = x_i & y_i.
// Bit 0 has no generate cell: its carry C1 comes from a 2:1 multiplexer,
// C1 = p_0 ? cin : x_0, so the carry in enters the tree as the group
// generate of position 0 and the adder can sit inside a pipelined
// accumulator whose carry arrives from the stage below. The remaining
// carries are computed by a Brent-Kung tree of (G,P) cells,
// G = g'' | p'' & g', P = p'' & p': an up-sweep that combines pairs at
// distances 1, 2, 4, ... and a down-sweep that fills the gaps, 2W-2-log2(W)
// cells in all (11 for W = 8). Sum bits are s_i = p_i ^ c_i with c_0 = cin,
// and cout is the group generate of all W bits.
//
// The multiplexer at bit 0 and the Brent-Kung tree shape follow the
// published adder; making the width a parameter (a power of two) is this
// implementation's choice. Purely combinational.
module bk_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned LG     = $clog2(W);
  localparam int unsigned LEVELS = 2 * LG - 1;  // up-sweep + down-sweep

  logic [W-1:0] p;
  logic [W-1:1] g;  // bit 0 has no generate cell
  logic         c1;

  // (G,P) after each level; level 0 is the bitwise p/g with the bit-0 mux.
  logic [W-1:0] gl [LEVELS+1];
  logic [W-1:0] pl [LEVELS+1];

  always_comb begin
    p = x ^ y;
    g = x[W-1:1] & y[W-1:1];
    c1 = p[0] ? cin : x[0];
  end

  assign gl[0] = {g, c1};
  assign pl[0] = {p[W-1:1], 1'b0};

  for (genvar lv = 0; lv < LEVELS; lv++) begin : g_level
    // Up-sweep levels 0..LG-1 use distance 2^lv; down-sweep levels use
    // distance 2^(2*LG-2-lv).
    localparam bit          UP   = (lv < LG);
    localparam int unsigned DIST = UP ? (1 << lv) : (1 << (2 * LG - 2 - lv));
    for (genvar i = 0; i < W; i++) begin : g_bit
      localparam bit COMBINE = UP ? (((i + 1) % (2 * DIST)) == 0)
                                  : ((((i + 1) % (2 * DIST)) == DIST) && (i >= 3 * DIST - 1));
      if (COMBINE) begin : g_cell
        assign gl[lv+1][i] = gl[lv][i] | (pl[lv][i] & gl[lv][i-DIST]);
        assign pl[lv+1][i] = pl[lv][i] & pl[lv][i-DIST];
      end else begin : g_pass
        assign gl[lv+1][i] = gl[lv][i];
        assign pl[lv+1][i] = pl[lv][i];
      end
    end
  end

  // gl[LEVELS][i] is the carry out of bit i, i.e. c_{i+1}.
  assign s    = p ^ {gl[LEVELS][W-2:0], cin};
  assign cout = gl[LEVELS][W-1];
endmodule
