// des_datapath: the 64-bit data path of the iterative DES decryption circuit.
//
// A pair of 32-bit registers L and R holds the block between rounds. In the
// first cycle of a block (loaddata_s1) the multiplexer takes the ciphertext
// through in_permute; in later cycles it takes the registers. One Feistel
// round is computed from the multiplexer output every cycle:
//   L' = R,  R' = L xor P(S(E(R) xor K)),
// and written back when round_en is high. After the 16th round the registers
// hold L16/R16; the output is out_permute applied to the swapped pair R16/L16,
// taken straight from the registers, so data_out is valid from the cycle
// after the 16th round until the next block is loaded.
// Interface: data_in and subkey are used in the cycle of each round;
// data_out is combinational from the registers.
module des_datapath (
  input  logic        clk,
  input  logic        loaddata_s1,
  input  logic        round_en,
  input  logic [63:0] data_in,
  input  logic [47:0] subkey,
  output logic [63:0] data_out
);

  logic [63:0] ip_data;
  logic [31:0] l_q, r_q;
  logic [31:0] l_sel, r_sel;
  logic [47:0] expanded;
  logic [31:0] sbox_out, f_out;

  des_in_permute u_ip (.din(data_in), .dout(ip_data));

  assign l_sel = loaddata_s1 ? ip_data[63:32] : l_q;
  assign r_sel = loaddata_s1 ? ip_data[31:0]  : r_q;

  // Round function f(R, K).
  des_e_box u_e (.din(r_sel), .dout(expanded));
  des_s_box u_s (.din(expanded ^ subkey), .dout(sbox_out));
  des_p_box u_p (.din(sbox_out), .dout(f_out));

  always_ff @(posedge clk) begin
    if (round_en) begin
      l_q <= r_sel;
      r_q <= l_sel ^ f_out;
    end
  end

  des_out_permute u_fp (.din({r_q, l_q}), .dout(data_out));

endmodule
