// des_vector_rom: test-vector ROM of the DES testbed.
//
// A DEPTH x WIDTH array filled from a hex file when the design is loaded
// (the FPGA flow fills it from the bitstream). The read is synchronous: q
// shows the word at addr one clock edge after addr is presented, like the
// block-RAM ROMs of the board. The testbed uses one instance for key and
// ciphertext pairs (128-bit words: key in the upper half) and one for the
// expected plaintext (64-bit words).
// The synchronous read port and the hex-file format are this design's choices.
module des_vector_rom #(
  parameter int unsigned WIDTH     = 128,
  parameter int unsigned DEPTH     = 8,
  parameter string       INIT_FILE = "rtl/des_input_vectors.hex"
) (
  input  logic                                    clk,
  input  logic [(DEPTH > 1 ? $clog2(DEPTH) : 1)-1:0] addr,
  output logic [WIDTH-1:0]                        q
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) q <= mem[addr];

endmodule
