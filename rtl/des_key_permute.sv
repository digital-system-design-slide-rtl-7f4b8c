// des_key_permute: permuted choice 1 (key_permute). Selects 56 of the 64 key
// bits as the C (upper 28) and D (lower 28) halves; the eight parity bits
// 8,16,...,64 are not used.
//
// Pure wiring, as the lab's datapath tables define it: output bit i of the
// standard's numbering (bit 1 = MSB) takes input bit PC1_TABLE[i]. There is no
// logic and no clock; the delay is that of the routing only. The table is
// des_pkg::PC1_TABLE. The table is the lab's own.
// Interface: din[63:0] in, dout[55:0] out, combinational.
module des_key_permute
  import des_pkg::*;
(
  input  logic [63:0] din,
  output logic [55:0] dout
);

  always_comb begin
    for (int i = 0; i < 56; i++) begin
      dout[55 - i] = din[64 - PC1_TABLE[i]];
    end
  end

endmodule
