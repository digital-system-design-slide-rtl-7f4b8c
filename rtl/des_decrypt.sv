// des_decrypt: iterative DES decryption circuit.
//
// Decrypts one 64-bit block with a 64-bit key (56 key bits are used; the
// parity bits are ignored) in 16 clock cycles, one Feistel round per cycle,
// reusing a single round function. It is built from the lab's parts: the
// control path (des_control), the datapath with in_permute, E-box, S-box,
// P-box and out_permute (des_datapath), and the key unit with key_permute,
// the right-rotating C/D registers and PC-2 (des_key_unit).
//
// Interface: a block is accepted in a cycle with in_valid && in_ready;
// in_key and in_data need only be valid in that cycle. out_valid rises 16
// cycles later and out_data is then held until out_ready. A new block can be
// accepted in the same cycle the previous result is taken, so the throughput
// is one block per 16 cycles when neither side stalls.
module des_decrypt (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] in_key,
  input  logic [63:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [63:0] out_data
);

  logic        loaddata_s1, shifttwo_s1, round_en;
  logic [3:0]  round;
  logic [47:0] subkey;

  des_control u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .out_valid, .out_ready,
    .loaddata_s1, .shifttwo_s1, .round_en, .round
  );

  des_key_unit u_key (
    .clk, .loaddata_s1, .shifttwo_s1, .round_en,
    .key_in (in_key),
    .subkey
  );

  des_datapath u_dp (
    .clk, .loaddata_s1, .round_en,
    .data_in  (in_data),
    .subkey,
    .data_out (out_data)
  );

  a_hold_data: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> $stable(out_data));

endmodule
