// tb_des_datapath: self-checking testbench for des_datapath.
//
// The round keys of two keys (from an independent software DES, in
// decryption order K16..K1) are fed cycle by cycle while the datapath
// decrypts the matching ciphertext. After 16 rounds the output must be the
// plaintext: 85E813540F0AB405 -> 0123456789ABCDEF under key 133457799BBCDFF1,
// and 0000000000000000 -> 8787878787878787 under key 0E329232EA6D0D73.
// The result must also stay put while round_en is low.
module tb_des_datapath;

  logic        clk = 1'b0;
  logic        loaddata_s1, round_en;
  logic [63:0] data_in, data_out;
  logic [47:0] subkey;
  int checks = 0;
  int failures = 0;

  des_datapath dut (.clk, .loaddata_s1, .round_en, .data_in, .subkey, .data_out);

  always #5 clk = ~clk;

  localparam logic [63:0] CT [2] = '{64'h85e813540f0ab405, 64'h0000000000000000};
  localparam logic [63:0] PT [2] = '{64'h0123456789abcdef, 64'h8787878787878787};
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

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s data_out=%h", what, data_out);
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
    loaddata_s1 = 0; round_en = 0; data_in = '0; subkey = '0;
    @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      for (int r = 0; r < 16; r++) begin
        loaddata_s1 = (r == 0);
        data_in     = (r == 0) ? CT[k] : 64'hdeadbeefdeadbeef;
        subkey      = RK[k][r];
        round_en    = 1'b1;
        @(negedge clk);
        if (r == 0) check(data_out != PT[k], "not done after one round");
      end
      round_en = 1'b0; loaddata_s1 = 1'b0;
      check(data_out == PT[k], $sformatf("plaintext %0d", k));
      repeat (3) @(negedge clk);
      subkey = ~subkey;
      @(negedge clk);
      check(data_out == PT[k], "result held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
