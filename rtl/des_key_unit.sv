// des_key_unit: round-key generator for DES decryption (the lab's key_unit).
//
// The 64-bit key passes through key_permute (PC-1) into the 28-bit C and D
// halves. Decryption needs the round keys K16 down to K1, so the halves are
// rotated right instead of left. In the first cycle of a block (loaddata_s1)
// the multiplexer takes PC-1 of the new key directly: since the encryption
// rotations add up to 28, C16/D16 equal C0/D0 and round 1 needs no rotation.
// In every later round the registered halves are rotated right by one place,
// or by two when shifttwo_s1 is high, before PC-2. The multiplexer output is
// both the source of the round key and the next register value, so the round
// key is valid in the same cycle as the round that uses it.
//
// Interface: key_in is sampled in cycles with loaddata_s1; the registers
// advance on the rising clock edge when round_en is high. subkey is
// combinational from the registers, the controls and key_in.
// The rotate-before-use order and the shared multiplexer are this design's
// reading of the key_unit schematic; the rotation counts follow DES.
module des_key_unit (
  input  logic        clk,
  input  logic        loaddata_s1,
  input  logic        shifttwo_s1,
  input  logic        round_en,
  input  logic [63:0] key_in,
  output logic [47:0] subkey
);

  logic [55:0] pc1_key;
  logic [27:0] c_q, d_q;
  logic [27:0] c_rot, d_rot;
  logic [27:0] c_sel, d_sel;

  des_key_permute u_pc1 (.din(key_in), .dout(pc1_key));

  // Right rotation: DES bit 28 (the LSB) moves to bit 1 (the MSB).
  always_comb begin
    if (shifttwo_s1) begin
      c_rot = {c_q[1:0], c_q[27:2]};
      d_rot = {d_q[1:0], d_q[27:2]};
    end else begin
      c_rot = {c_q[0], c_q[27:1]};
      d_rot = {d_q[0], d_q[27:1]};
    end
  end

  assign c_sel = loaddata_s1 ? pc1_key[55:28] : c_rot;
  assign d_sel = loaddata_s1 ? pc1_key[27:0]  : d_rot;

  always_ff @(posedge clk) begin
    if (round_en) begin
      c_q <= c_sel;
      d_q <= d_sel;
    end
  end

  des_pc2_box u_pc2 (.din({c_sel, d_sel}), .dout(subkey));

endmodule
