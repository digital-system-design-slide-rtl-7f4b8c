// tb_des_vector_rom: self-checking testbench for des_vector_rom.
//
// Loads the testbed's two vector files and reads every address in a random
// order, checking the word one clock after the address against the values
// typed in below (the key/ciphertext pairs of the testbed and their
// plaintexts, from an independent software DES).
module tb_des_vector_rom;

  logic         clk = 1'b0;
  logic [2:0]   addr;
  logic [127:0] q_in;
  logic [63:0]  q_exp;
  int checks = 0;
  int failures = 0;

  des_vector_rom #(.WIDTH(128), .DEPTH(8), .INIT_FILE("rtl/des_input_vectors.hex"))
    u_in (.clk, .addr, .q(q_in));
  des_vector_rom #(.WIDTH(64), .DEPTH(8), .INIT_FILE("rtl/des_expected_vectors.hex"))
    u_exp (.clk, .addr, .q(q_exp));

  always #5 clk = ~clk;

  localparam logic [127:0] IN [8] = '{
    128'h133457799bbcdff185e813540f0ab405, 128'h0e329232ea6d0d730000000000000000,
    128'h0123456789abcdef3fa40e8a984d4815, 128'h010101010101010195f8a5e5dd31d900,
    128'h7ca110454a1a6e57690f5b0d9a26939b, 128'h0131d9619dc1376e7a389d10354bd271,
    128'h5ce7c2c8e3d3451284919c8ef386277f, 128'hd892874c66cb7e572b96a677517bc7ff
  };
  localparam logic [63:0] EXP [8] = '{
    64'h0123456789abcdef, 64'h8787878787878787, 64'h4e6f772069732074, 64'h8000000000000000,
    64'h01a1d6d039776742, 64'h5cd54ca83def57da, 64'h2e03d6fecd704dbf, 64'h5028d24cabb247ed
  };

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s addr=%0d", what, addr);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      addr = (i < 8) ? 3'(i) : 3'($urandom_range(7));
      @(posedge clk);
      #1;
      check(q_in == IN[addr], "input-vector word");
      check(q_exp == EXP[addr], "expected-plaintext word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
