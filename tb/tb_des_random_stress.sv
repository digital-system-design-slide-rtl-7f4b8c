// tb_des_random_stress: many-vector test of des_decrypt against a software DES model.
//
// First checks the behavioural model of des_ref_pkg against six published
// known answers. Then 3000 blocks, each with a fresh random key and random
// plaintext, are encrypted by the model and decrypted by the engine, with
// random gaps on the input side and random stalls on the output side; every
// plaintext is compared. Also checked: weak keys (all-zero and all-one C/D
// halves), and that flipping only parity bits of the key leaves the result
// unchanged, since the engine uses 56 of the 64 key bits.
module tb_des_random_stress;
  import des_ref_pkg::*;

  localparam int N = 3000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid, in_ready, out_valid, out_ready;
  logic [63:0] in_key, in_data, out_data;
  int checks = 0;
  int failures = 0;

  des_decrypt dut (.clk, .rst_n, .in_valid, .in_ready, .in_key, .in_data,
                   .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  logic [63:0] exp_q [$];
  int n_in = 0, n_out = 0;
  logic [63:0] next_key, next_pt;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // The key for block i: random, a weak key, or the previous key with the
  // parity bits flipped.
  function automatic logic [63:0] pick_key(input int i, input logic [63:0] prev);
    case (i % 500)
      1:       return 64'h0101010101010101;
      2:       return 64'hfefefefefefefefe;
      3:       return 64'h1f1f1f1f0e0e0e0e;
      4:       return prev ^ 64'h0101010101010101;
      default: return {$urandom, $urandom};
    endcase
  endfunction

  initial begin
    repeat (N * 40) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(des_ref_selftest() == 0, "reference model known answers");
    rst_n = 0; in_valid = 0; out_ready = 0; in_key = '0; in_data = '0;
    next_key = {$urandom, $urandom};
    next_pt  = {$urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n_out < N) begin
      in_valid  = (n_in < N) && ($urandom_range(7) != 0);
      in_key    = next_key;
      in_data   = crypt(next_key, next_pt, 0);
      out_ready = ($urandom_range(5) != 0);
      #1;
      if (out_valid && out_ready) begin
        check(out_data == exp_q.pop_front(), $sformatf("block %0d", n_out));
        n_out++;
      end
      if (in_valid && in_ready) begin
        exp_q.push_back(next_pt);
        // Parity-flipped keys must decrypt the same: the next block reuses
        // the plaintext under the flipped key.
        n_in++;
        next_key = pick_key(n_in, next_key);
        if (n_in % 500 != 4) next_pt = {$urandom, $urandom};
      end
      @(negedge clk);
    end
    $display("blocks=%0d", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
