// des_in_permute: initial permutation (IP) of the 64-bit ciphertext block, the
// datapath in_permute of the lab slides.
//
// Pure wiring, as the lab's datapath tables define it: output bit i of the
// standard's numbering (bit 1 = MSB) takes input bit IP_TABLE[i]. There is no
// logic and no clock; the delay is that of the routing only. The table is
// des_pkg::IP_TABLE. The table is the lab's own.
// Interface: din[63:0] in, dout[63:0] out, combinational.
module des_in_permute
  import des_pkg::*;
(
  input  logic [63:0] din,
  output logic [63:0] dout
);

  always_comb begin
    for (int i = 0; i < 64; i++) begin
      dout[63 - i] = din[64 - IP_TABLE[i]];
    end
  end

endmodule
