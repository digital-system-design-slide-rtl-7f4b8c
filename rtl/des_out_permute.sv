// des_out_permute: final permutation (IP^-1) that turns the swapped R16/L16
// pair into the 64-bit plaintext, the datapath out_permute of the lab slides.
//
// Pure wiring, as the lab's datapath tables define it: output bit i of the
// standard's numbering (bit 1 = MSB) takes input bit FP_TABLE[i]. There is no
// logic and no clock; the delay is that of the routing only. The table is
// des_pkg::FP_TABLE. The table is the lab's own.
// Interface: din[63:0] in, dout[63:0] out, combinational.
module des_out_permute
  import des_pkg::*;
(
  input  logic [63:0] din,
  output logic [63:0] dout
);

  always_comb begin
    for (int i = 0; i < 64; i++) begin
      dout[63 - i] = din[64 - FP_TABLE[i]];
    end
  end

endmodule
