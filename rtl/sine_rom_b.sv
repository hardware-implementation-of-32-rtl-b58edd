// sine_rom_b: sub-ROM B of the compressed quarter-wave sine table,
// 16 words of 8 bits (128 bits).
//
// B is the middle four bits of the 12-bit quarter-wave phase. Since sub-ROM
// A samples its angle at the centre of each coarse step, B measures the
// remaining angle from that centre: -8..7 steps of 16 fine steps,
// word b = round(2047 * sin(pi/2 * 16 * (b - 8) / 4096)), stored as an
// 8-bit two's-complement number in units of the 11-bit output LSB. The
// angle stays within 0.05 rad, small enough to take cos B = 1.
// Combinational read.
//
// The 16 x 8 size follows the published design; the signed, centred
// angle is this implementation's choice.
module sine_rom_b
  import ddfs_pkg::*;
(
  input  logic [SUB_W-1:0]  addr,
  output logic signed [7:0] sin_b
);
  function automatic logic signed [7:0] rom(input logic [SUB_W-1:0] a);
    unique case (a)
      4'd0 : rom = -8'sd100;
      4'd1 : rom = -8'sd88;
      4'd2 : rom = -8'sd75;
      4'd3 : rom = -8'sd63;
      4'd4 : rom = -8'sd50;
      4'd5 : rom = -8'sd38;
      4'd6 : rom = -8'sd25;
      4'd7 : rom = -8'sd13;
      4'd8 : rom = 8'sd0;
      4'd9 : rom = 8'sd13;
      4'd10: rom = 8'sd25;
      4'd11: rom = 8'sd38;
      4'd12: rom = 8'sd50;
      4'd13: rom = 8'sd63;
      4'd14: rom = 8'sd75;
      4'd15: rom = 8'sd88;
      default: rom = '0;
    endcase
  endfunction

  assign sin_b = rom(addr);
endmodule
