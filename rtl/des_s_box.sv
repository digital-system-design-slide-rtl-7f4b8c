// des_s_box: substitution box of the DES round function.
//
// A single 2^48-word ROM, or 32 logic functions of 48 inputs, would be far
// too large, so as in the lab slides the 48-bit input is cut into eight 6-bit
// groups and each group addresses its own 64 x 4-bit ROM. Group 1 (the most
// significant six bits) feeds S-box 1, whose 4-bit result forms the most
// significant nibble of the 32-bit output, and so on down to S-box 8.
// Interface: din[47:0] in, dout[31:0] out, combinational.
module des_s_box (
  input  logic [47:0] din,
  output logic [31:0] dout
);

  for (genvar g = 0; g < 8; g++) begin : g_rom
    des_sbox_rom #(.BOX(g + 1)) u_rom (
      .addr (din[47 - 6*g -: 6]),
      .data (dout[31 - 4*g -: 4])
    );
  end

endmodule
