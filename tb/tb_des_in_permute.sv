// tb_des_in_permute: self-checking testbench for des_in_permute, the initial permutation.
//
// Known-answer vectors from an independent software DES; the first one is the worked example of the standard literature (key 133457799BBCDFF1, plaintext 0123456789ABCDEF).
// Combinational block: each vector is applied, 1 time unit allowed, output compared.
module tb_des_in_permute;

  logic [63:0] din;
  logic [63:0] dout;
  int checks = 0;
  int failures = 0;

  des_in_permute dut (.din, .dout);

  logic [63:0] inv_out;
  des_out_permute u_inv (.din(dout), .dout(inv_out));

  typedef struct packed { logic [63:0] x; logic [63:0] y; } vec_t;
  localparam vec_t VECS [5] = '{
    '{64'h0123456789abcdef, 64'hcc00ccfff0aaf0aa},
    '{64'hf2a74de452e6b438, 64'h3dd16e066beb8433},
    '{64'h6513270e269e0d37, 64'h01a2fdc7209568be},
    '{64'h0c5c7fd0a6a3a450, 64'h8e8e572478740734},
    '{64'hd23f0824128b2f33, 64'h01934ae221ca66f3}
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
    // IP followed by IP^-1 must give the input back.
    for (int i = 0; i < 200; i++) begin
      din = {$urandom, $urandom};
      #1;
      check(inv_out == din, "IP^-1(IP(x)) == x");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
