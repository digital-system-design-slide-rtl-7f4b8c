// tb_des_key_permute: self-checking testbench for des_key_permute, permuted choice 1.
//
// Known-answer vectors from an independent software DES; the first one is the worked example of the standard literature (key 133457799BBCDFF1, plaintext 0123456789ABCDEF).
// Combinational block: each vector is applied, 1 time unit allowed, output compared.
module tb_des_key_permute;

  logic [63:0] din;
  logic [55:0] dout;
  int checks = 0;
  int failures = 0;

  des_key_permute dut (.din, .dout);

  typedef struct packed { logic [63:0] x; logic [55:0] y; } vec_t;
  localparam vec_t VECS [5] = '{
    '{64'h133457799bbcdff1, 56'hf0ccaaf556678f},
    '{64'h1600a35a099950d8, 56'ha4c804e0d01b89},
    '{64'h6b0d549b6f03675a, 56'h08d5518f9569bc},
    '{64'h3d9c172411e20b8f, 56'ha220291e48fc37},
    '{64'h8d116ece1738f7d9, 56'hc9cc64f5c5dad2}
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
