// des_e_box: expansion box. Spreads the 32-bit R half over 48 bits, repeating
// the edge bits of each 4-bit group, so it can be xored with the round key.
//
// Pure wiring, as the lab's datapath tables define it: output bit i of the
// standard's numbering (bit 1 = MSB) takes input bit E_TABLE[i]. There is no
// logic and no clock; the delay is that of the routing only. The table is
// des_pkg::E_TABLE. The lab only names this table; it is the one of the DES
// standard.
// Interface: din[31:0] in, dout[47:0] out, combinational.
module des_e_box
  import des_pkg::*;
(
  input  logic [31:0] din,
  output logic [47:0] dout
);

  always_comb begin
    for (int i = 0; i < 48; i++) begin
      dout[47 - i] = din[32 - E_TABLE[i]];
    end
  end

endmodule
