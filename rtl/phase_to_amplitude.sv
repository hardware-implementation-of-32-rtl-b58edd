// phase_to_amplitude: converts the 14-bit truncated phase into a 12-bit
// sine sample using quarter-wave symmetry and a three-way angular split of
// the quarter-wave phase, with only 368 bits of ROM.
//
// phase[13] (MSB1) is the sign of the sine and phase[12] (MSB2) tells a
// rising quarter from a falling one: in falling quarters the lower 12 bits
// are one's-complemented (XOR with MSB2), which with the half-LSB sample
// offset of the tables mirrors the phase exactly. The folded 12-bit phase
// is split into A (bits 11:8), B (7:4) and C (3:0), and
//   sin(A + B + C) ~ sin A + cos A * sin B + cos A * sin C,
// with cos B and cos C taken as 1 and the sin B * sin C terms dropped.
// sine_rom_a supplies sin A and cos A, sine_rom_b and sine_rom_c supply
// sin B and sin C in units of the output LSB. Two multipliers form
// cos A * sin B and cos A * sin C (each rounded to the output LSB by
// dividing by 2^11) and two adders sum the three terms into the 11-bit
// magnitude, clamped to 0..2047. The magnitude and MSB1 are registered;
// after the register a final one's complement controlled by MSB1 gives
// the offset-binary word amp = {~MSB1, mag ^ MSB1} for a unipolar DAC
// (2048 + mag above the axis, 2047 - mag below).
//
// Timing: amp and mag are valid one clock after phase. The folding, the
// three sub-ROMs, the shared sin/cos ROM, the two multipliers and adders,
// the register with a delayed MSB1 and the output complement follow the
// published converter; the rounding, clamping and output coding are this
// implementation's choices.
module phase_to_amplitude
  import ddfs_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [PHASE_W-1:0] phase,
  output logic [AMP_W-1:0]   amp,
  output logic [MAG_W-1:0]   mag
);
  localparam int unsigned Q_W = PHASE_W - 2;  // quarter-wave phase bits

  logic                msb1, msb2;
  logic [Q_W-1:0]      q;
  logic [MAG_W-1:0]    sin_a, cos_a;
  logic signed [7:0]   sin_b;
  logic [3:0]          sin_c;
  logic signed [20:0]  prod_b;      // cos A * sin B
  logic [14:0]         prod_c;      // cos A * sin C
  logic signed [13:0]  term_b, term_c, total;
  logic [MAG_W-1:0]    mag_d;
  logic                sign_q;

  assign msb1 = phase[PHASE_W-1];
  assign msb2 = phase[PHASE_W-2];
  assign q    = phase[Q_W-1:0] ^ {Q_W{msb2}};

  sine_rom_a u_rom_a (.addr(q[11:8]), .sin_a(sin_a), .cos_a(cos_a));
  sine_rom_b u_rom_b (.addr(q[7:4]),  .sin_b(sin_b));
  sine_rom_c u_rom_c (.addr(q[3:0]),  .sin_c(sin_c));

  always_comb begin
    prod_b = $signed({10'b0, cos_a}) * 21'(sin_b);
    prod_c = {4'b0, cos_a} * {11'b0, sin_c};
    term_b = 14'((prod_b + 21'sd1024) >>> MAG_W);
    term_c = 14'((prod_c + 15'd1024) >> MAG_W);
    total  = $signed({3'b0, sin_a}) + term_b + term_c;
    if (total < 0)                       mag_d = '0;
    else if (total > 14'sd2047)          mag_d = '1;
    else                                 mag_d = total[MAG_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mag    <= '0;
      sign_q <= 1'b0;
    end else begin
      mag    <= mag_d;
      sign_q <= msb1;
    end
  end

  assign amp = {~sign_q, mag ^ {MAG_W{sign_q}}};
endmodule
