// tb_des_s_box: self-checking testbench for des_s_box, the substitution box.
//
// Known-answer vectors from an independent software DES; the first one is the worked example of the standard literature (key 133457799BBCDFF1, plaintext 0123456789ABCDEF).
// Combinational block: each vector is applied, 1 time unit allowed, output compared.
module tb_des_s_box;

  logic [47:0] din;
  logic [31:0] dout;
  int checks = 0;
  int failures = 0;

  des_s_box dut (.din, .dout);

  typedef struct packed { logic [47:0] x; logic [31:0] y; } vec_t;
  localparam vec_t VECS [7] = '{
    '{48'h6117ba866527, 32'h5c82b597},
    '{48'h3898f9ebdacc, 32'h8fac384b},
    '{48'h8e810becd7b0, 32'hca9f4910},
    '{48'h2217dbc496cb, 32'h2d1a67f3},
    '{48'h6b4c4a23d596, 32'h9c46787e},
    '{48'h8a6a24ede6a4, 32'h1b894ba4},
    '{48'h92271e27a1c0, 32'hee2f4d7d}
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
    for (int i = 0; i < 7; i++) begin
      din = VECS[i].x;
      #1;
      check(dout == VECS[i].y, "known answer");
    end
    // Every row of every S-box is a permutation of 0..15: for a fixed row of
    // box b, the 16 columns give 16 distinct values.
    for (int b = 0; b < 8; b++) begin
      for (int row = 0; row < 4; row++) begin
        logic [15:0] seen;
        seen = '0;
        for (int col = 0; col < 16; col++) begin
          din = '0;
          din[47 - 6*b -: 6] = {row[1], col[3:0], row[0]};
          #1;
          seen[dout[31 - 4*b -: 4]] = 1'b1;
        end
        check(seen == 16'hFFFF, "S-box row is a permutation");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
