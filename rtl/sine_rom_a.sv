// sine_rom_a: sub-ROM A of the compressed quarter-wave sine table,
// 16 words of 11 bits (176 bits), with two read addresses.
//
// Word a holds round(2047 * sin(pi/2 * (a + 0.5) / 16)): the sine of the
// coarse angle A, the top four bits of the 12-bit quarter-wave phase,
// taken at the centre of its step. Because of that half-step offset the
// table read backwards is the cosine table, cos(A) = word(15 - a), so one
// ROM serves both sin A and cos A: the cosine port is addressed with the
// sine address complemented by XOR gates whose other input is tied high.
// The XOR sits inside this block, so both ports take the same address A.
// Combinational (asynchronous) read.
//
// The 16 x 11 size and the shared sin/cos ROM follow the published
// design; placing the complement on the address and the half-step sample
// points are this implementation's reading of it.
module sine_rom_a
  import ddfs_pkg::*;
(
  input  logic [SUB_W-1:0] addr,
  output logic [MAG_W-1:0] sin_a,
  output logic [MAG_W-1:0] cos_a
);
  function automatic logic [MAG_W-1:0] rom(input logic [SUB_W-1:0] a);
    unique case (a)
      4'd0 : rom = 11'd100;
      4'd1 : rom = 11'd300;
      4'd2 : rom = 11'd497;
      4'd3 : rom = 11'd690;
      4'd4 : rom = 11'd875;
      4'd5 : rom = 11'd1052;
      4'd6 : rom = 11'd1219;
      4'd7 : rom = 11'd1375;
      4'd8 : rom = 11'd1517;
      4'd9 : rom = 11'd1644;
      4'd10: rom = 11'd1756;
      4'd11: rom = 11'd1850;
      4'd12: rom = 11'd1927;
      4'd13: rom = 11'd1986;
      4'd14: rom = 11'd2025;
      4'd15: rom = 11'd2045;
      default: rom = '0;
    endcase
  endfunction

  assign sin_a = rom(addr);
  assign cos_a = rom(addr ^ {SUB_W{1'b1}});
endmodule
