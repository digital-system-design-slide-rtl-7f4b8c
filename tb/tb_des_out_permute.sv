// tb_des_out_permute: self-checking testbench for des_out_permute, the final permutation.
//
// Known-answer vectors from an independent software DES; the first one is the worked example of the standard literature (key 133457799BBCDFF1, plaintext 0123456789ABCDEF).
// Combinational block: each vector is applied, 1 time unit allowed, output compared.
module tb_des_out_permute;

  logic [63:0] din;
  logic [63:0] dout;
  int checks = 0;
  int failures = 0;

  des_out_permute dut (.din, .dout);

  typedef struct packed { logic [63:0] x; logic [63:0] y; } vec_t;
  localparam vec_t VECS [5] = '{
    '{64'h0a4cd99543423234, 64'h85e813540f0ab405},
    '{64'h1818e811892f902b, 64'ha32220f65926048c},
    '{64'h9531985d5d9dc9f8, 64'hf900e1aff7128b6e},
    '{64'he8e25d940ed90475, 64'h26908fe427527671},
    '{64'h36f675cc81e74ef5, 64'ha6787f0956763fb3}
  };

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (din=%h dout=%h)", what, din, dout);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin
      din = VECS[i].x;
      #1;
      check(dout == VECS[i].y, "known answer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
