// tb_des_key_unit: self-checking testbench for des_key_unit.
//
// For two keys the unit is loaded and stepped through 16 rounds with the
// decryption rotation pattern (two places in rounds 3-8 and 10-15, one place
// otherwise). Each cycle the round key is compared with K16, K15, ..., K1 as
// computed by an independent software DES. The first key is the textbook
// example key 133457799BBCDFF1 (K16 = CB3D8B0E17F5, K1 = 1B02EFFC7072).
// A pause with round_en low in the middle checks that the registers hold.
module tb_des_key_unit;

  logic        clk = 1'b0;
  logic        loaddata_s1, shifttwo_s1, round_en;
  logic [63:0] key_in;
  logic [47:0] subkey;
  int checks = 0;
  int failures = 0;

  des_key_unit dut (.clk, .loaddata_s1, .shifttwo_s1, .round_en, .key_in, .subkey);

  always #5 clk = ~clk;

  localparam logic [63:0] KEYS [2] = '{64'h133457799bbcdff1, 64'h0e329232ea6d0d73};
  localparam logic [47:0] RK [2][16] = '{
    '{48'hcb3d8b0e17f5, 48'hbf918d3d3f0a, 48'h5f43b7f2e73a, 48'h97c5d1faba41,
      48'h7571f59467e9, 48'h215fd3ded386, 48'hb1f347ba464f, 48'he0dbebede781,
      48'hf78a3ac13bfb, 48'hec84b7f618bc, 48'h63a53e507b2f, 48'h7cec07eb53a8,
      48'h72add6db351d, 48'h55fc8a42cf99, 48'h79aed9dbc9e5, 48'h1b02effc7072},
    '{48'h606f044c3ae7, 48'h1432961f77c4, 48'h918a949e871f, 48'hf100a1f38ec3,
      48'h3105aba5e2f5, 48'h09e1878c79d6, 48'h43c9453f4c2e, 48'h54554179f633,
      48'h264894cb36e9, 48'h25005ec5d49d, 48'h38901b58c9de, 48'h7a83826f4f64,
      48'he7c4828fb533, 48'h45a473239ddb, 48'h40bd1176e8fd, 48'h36146478e1e1}
  };
  // Rotation by two for rounds 1..16 (round 1 is the load cycle).
  localparam logic SHIFT2 [16] = '{0,0,1,1,1,1,1,1,0,1,1,1,1,1,1,0};

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s subkey=%h", what, subkey);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    loaddata_s1 = 0; shifttwo_s1 = 0; round_en = 0; key_in = '0;
    @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      for (int r = 0; r < 16; r++) begin
        loaddata_s1 = (r == 0);
        key_in      = (r == 0) ? KEYS[k] : ~KEYS[k];  // key only needed in cycle 1
        shifttwo_s1 = SHIFT2[r];
        round_en    = 1'b1;
        #1;
        check(subkey == RK[k][r], $sformatf("key %0d round %0d", k, r + 1));
        if (r == 7) begin
          // Hold for three cycles: nothing may change.
          @(negedge clk);
          round_en = 1'b0;
          repeat (3) @(negedge clk);
          shifttwo_s1 = SHIFT2[r + 1];
          #1;
          check(subkey == RK[k][r + 1], "hold keeps the registers");
          round_en = 1'b1;
        end else begin
          @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
