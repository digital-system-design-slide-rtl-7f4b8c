// des_pc2_box: permuted choice 2 (PC-2 selection box). Picks the 48-bit round
// key out of the 56-bit C/D pair of the key unit.
//
// Pure wiring, as the lab's datapath tables define it: output bit i of the
// standard's numbering (bit 1 = MSB) takes input bit PC2_TABLE[i]. There is no
// logic and no clock; the delay is that of the routing only. The table is
// des_pkg::PC2_TABLE. The table is the lab's own.
// Interface: din[55:0] in, dout[47:0] out, combinational.
module des_pc2_box
  import des_pkg::*;
(
  input  logic [55:0] din,
  output logic [47:0] dout
);

  always_comb begin
    for (int i = 0; i < 48; i++) begin
      dout[47 - i] = din[56 - PC2_TABLE[i]];
    end
  end

endmodule
