// des_p_box: permutation box applied to the 32-bit S-box output inside the
// round function.
//
// Pure wiring, as the lab's datapath tables define it: output bit i of the
// standard's numbering (bit 1 = MSB) takes input bit P_TABLE[i]. There is no
// logic and no clock; the delay is that of the routing only. The table is
// des_pkg::P_TABLE. The lab only names this table; it is the one of the DES
// standard.
// Interface: din[31:0] in, dout[31:0] out, combinational.
module des_p_box
  import des_pkg::*;
(
  input  logic [31:0] din,
  output logic [31:0] dout
);

  always_comb begin
    for (int i = 0; i < 32; i++) begin
      dout[31 - i] = din[32 - P_TABLE[i]];
    end
  end

endmodule
