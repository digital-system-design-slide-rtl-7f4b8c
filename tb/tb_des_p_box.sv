// tb_des_p_box: self-checking testbench for des_p_box, the permutation box.
//
// Known-answer vectors from an independent software DES; the first one is the worked example of the standard literature (key 133457799BBCDFF1, plaintext 0123456789ABCDEF).
// Combinational block: each vector is applied, 1 time unit allowed, output compared.
module tb_des_p_box;

  logic [31:0] din;
  logic [31:0] dout;
  int checks = 0;
  int failures = 0;

  des_p_box dut (.din, .dout);

  typedef struct packed { logic [31:0] x; logic [31:0] y; } vec_t;
  localparam vec_t VECS [5] = '{
    '{32'h5c82b597, 32'h234aa9bb},
    '{32'h93bd04cf, 32'hcc92596f},
    '{32'h95e60af5, 32'h12f15d37},
    '{32'h658cda14, 32'h3324d370},
    '{32'h0cb1e29c, 32'h8f2c01b5}
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
