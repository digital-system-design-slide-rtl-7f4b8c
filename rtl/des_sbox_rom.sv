// des_sbox_rom: one of the eight 64-word by 4-bit S-box ROMs.
//
// The 6-bit address b1..b6 (b1 = addr[5]) picks row {b1,b6} and column
// b2..b5 of S-box number BOX (1 to 8) of the DES standard. The ROM is
// asynchronous (a lookup table), so the round function stays combinational.
// Interface: addr[5:0] in, data[3:0] out.
module des_sbox_rom
  import des_pkg::*;
#(
  parameter int unsigned BOX = 1
) (
  input  logic [5:0] addr,
  output logic [3:0] data
);

  logic [1:0] row;
  logic [3:0] col;

  assign row  = {addr[5], addr[0]};
  assign col  = addr[4:1];
  assign data = SBOX_TABLE[BOX-1][{row, col}];

endmodule
