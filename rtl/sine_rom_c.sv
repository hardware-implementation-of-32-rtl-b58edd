// sine_rom_c: sub-ROM C of the compressed quarter-wave sine table,
// 16 words of 4 bits (64 bits).
//
// C is the low four bits of the 12-bit quarter-wave phase. Word c holds
// round(2047 * sin(pi/2 * (c + 0.5) / 4096)) in units of the 11-bit output
// LSB. The extra half LSB of phase places every sample in the middle of its
// phase step, which makes the quarter-wave table symmetric, so the
// mirrored quarters can use the one's complement of the phase instead of
// its two's complement (no incrementer). Combinational read.
//
// The 16 x 4 size and the half-LSB offset follow the published design.
module sine_rom_c
  import ddfs_pkg::*;
(
  input  logic [SUB_W-1:0] addr,
  output logic [3:0]       sin_c
);
  function automatic logic [3:0] rom(input logic [SUB_W-1:0] a);
    unique case (a)
      4'd0 : rom = 4'd0;
      4'd1 : rom = 4'd1;
      4'd2 : rom = 4'd2;
      4'd3 : rom = 4'd3;
      4'd4 : rom = 4'd4;
      4'd5 : rom = 4'd4;
      4'd6 : rom = 4'd5;
      4'd7 : rom = 4'd6;
      4'd8 : rom = 4'd7;
      4'd9 : rom = 4'd7;
      4'd10: rom = 4'd8;
      4'd11: rom = 4'd9;
      4'd12: rom = 4'd10;
      4'd13: rom = 4'd11;
      4'd14: rom = 4'd11;
      4'd15: rom = 4'd12;
      default: rom = '0;
    endcase
  endfunction

  assign sin_c = rom(addr);
endmodule
