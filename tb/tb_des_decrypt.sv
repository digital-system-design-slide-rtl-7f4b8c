// tb_des_decrypt: self-checking testbench for des_decrypt.
//
// Sixteen key/ciphertext/plaintext triples are decrypted: six published
// known-answer vectors (the textbook example, "Now is t" under key
// 0123456789ABCDEF, NIST variable-plaintext and S-box tests) and ten random
// ones, all computed by an independent software DES. The producer inserts
// random gaps and the consumer random stalls. Checked: every plaintext in
// order, out_valid exactly 16 cycles after acceptance, the plaintext held
// while stalled, and one block per 16 cycles when neither side waits.
module tb_des_decrypt;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid, in_ready, out_valid, out_ready;
  logic [63:0] in_key, in_data, out_data;
  int checks = 0;
  int failures = 0;

  des_decrypt dut (.clk, .rst_n, .in_valid, .in_ready, .in_key, .in_data,
                   .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  typedef struct packed { logic [63:0] key; logic [63:0] ct; logic [63:0] pt; } vec_t;
  localparam int N = 16;
  localparam vec_t VECS [N] = '{
    '{64'h133457799bbcdff1, 64'h85e813540f0ab405, 64'h0123456789abcdef},
    '{64'h0e329232ea6d0d73, 64'h0000000000000000, 64'h8787878787878787},
    '{64'h0123456789abcdef, 64'h3fa40e8a984d4815, 64'h4e6f772069732074},
    '{64'h0101010101010101, 64'h95f8a5e5dd31d900, 64'h8000000000000000},
    '{64'h7ca110454a1a6e57, 64'h690f5b0d9a26939b, 64'h01a1d6d039776742},
    '{64'h0131d9619dc1376e, 64'h7a389d10354bd271, 64'h5cd54ca83def57da},
    '{64'h8f6d05584ef8aa38, 64'h254cac281cc038bd, 64'hae97ba94d0eda82f},
    '{64'h1a61dbe22e44158b, 64'h4e38973eba0a182e, 64'h923a736994e3bf91},
    '{64'h301850c5a38fd547, 64'hd2acafe13110d520, 64'h18f135d25f557203},
    '{64'hb64ce4228c38fb29, 64'hd86ab00fb05c1158, 64'h907a70c31012f037},
    '{64'h9e7769b10f4205b4, 64'h68294b8641f8901f, 64'h7f15052434b9b5df},
    '{64'h881ed162ae2eb154, 64'h37a4da88e4aab0bb, 64'hc6f877186d76b07e},
    '{64'h7731af10506bf2ef, 64'h5541d8e4c7f51664, 64'hec66a78795e761d1},
    '{64'h5c90a9587403e430, 64'h9cb39f6ec87381df, 64'h3f98e2774cbd87ad},
    '{64'h2e05319acb5c7427, 64'hb006793e6d4de466, 64'hc7a2ea20b2f14c94},
    '{64'h14f4733f3e7d1bfb, 64'h10f42e8a4572901a, 64'h4cdd2055930d6eaf}
  };

  int          cycle = 0;
  int          accept_cycle [N];
  int          n_in = 0, n_out = 0;
  int          last_out_cycle = -1;
  int          back_to_back = 0;
  int          stalls = 0;
  logic        stalled_q = 1'b0;
  logic [63:0] stalled_data;
  // Phase 1 (first 8 blocks): random gaps and stalls. Phase 2: none.
  logic        phase2;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive on the falling edge.
  always @(negedge clk) begin
    phase2    = (n_out >= 8);
    in_valid  = (n_in < N) && (phase2 || ($urandom_range(3) != 0));
    in_key    = VECS[n_in % N].key;
    in_data   = VECS[n_in % N].ct;
    out_ready = phase2 || ($urandom_range(2) != 0);
  end

  // Monitor on the rising edge. out_valid must rise exactly 16 cycles after
  // the cycle in which its block was accepted.
  logic prev_out_valid = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (stalled_q) check(out_valid && out_data == stalled_data, "held while stalled");
      if (out_valid && !prev_out_valid)
        check(cycle - accept_cycle[n_out] == 16, $sformatf("latency of block %0d is 16 cycles", n_out));
      if (out_valid && out_ready) begin
        check(out_data == VECS[n_out].pt, $sformatf("plaintext %0d: got %h", n_out, out_data));
        if (n_out >= 9) begin
          check(cycle - last_out_cycle == 16, "one block per 16 cycles");
          back_to_back++;
        end
        last_out_cycle = cycle;
        n_out++;
      end
      if (in_valid && in_ready) begin
        accept_cycle[n_in] = cycle;
        n_in++;
      end
      prev_out_valid = out_valid && !out_ready;
      stalled_q      = out_valid && !out_ready;
      stalled_data   = out_data;
      if (stalled_q) stalls++;
    end
    cycle++;
  end

  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_out == N);
    @(negedge clk);
    check(stalls > 0, "consumer stalls happened");
    check(back_to_back >= 6, "back-to-back blocks happened");
    $display("blocks=%0d stall cycles=%0d back-to-back=%0d", n_out, stalls, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
