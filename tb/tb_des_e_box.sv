// tb_des_e_box: self-checking testbench for des_e_box, the expansion box.
//
// Known-answer vectors from an independent software DES; the first one is the worked example of the standard literature (key 133457799BBCDFF1, plaintext 0123456789ABCDEF).
// Combinational block: each vector is applied, 1 time unit allowed, output compared.
module tb_des_e_box;

  logic [31:0] din;
  logic [47:0] dout;
  int checks = 0;
  int failures = 0;

  des_e_box dut (.din, .dout);

  typedef struct packed { logic [31:0] x; logic [47:0] y; } vec_t;
  localparam vec_t VECS [5] = '{
    '{32'hf0aaf0aa, 48'h7a15557a1555},
    '{32'ha09f76b5, 48'hd014febad5ab},
    '{32'h953f48f1, 48'hcaa9fea517a3},
    '{32'hf29d0da9, 48'hfa54fa85bd53},
    '{32'h0fd630f1, 48'h85feac1a17a2}
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
