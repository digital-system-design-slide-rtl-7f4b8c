// tb_des_pc2_box: self-checking testbench for des_pc2_box, permuted choice 2.
//
// Known-answer vectors from an independent software DES; the first one is the worked example of the standard literature (key 133457799BBCDFF1, plaintext 0123456789ABCDEF).
// Combinational block: each vector is applied, 1 time unit allowed, output compared.
module tb_des_pc2_box;

  logic [55:0] din;
  logic [47:0] dout;
  int checks = 0;
  int failures = 0;

  des_pc2_box dut (.din, .dout);

  typedef struct packed { logic [55:0] x; logic [47:0] y; } vec_t;
  localparam vec_t VECS [4] = '{
    '{56'h0f21dd6cad4a26, 48'h7460fc1fe012},
    '{56'h90c192d3ac94af, 48'h4919a4b4ad61},
    '{56'hf28c101fb17c23, 48'h8b011727e937},
    '{56'ha170b339263059, 48'h7b1e4c400b4b}
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
    for (int i = 0; i < 4; i++) begin
      din = VECS[i].x;
      #1;
      check(dout == VECS[i].y, "known answer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
