// tb_des_control: self-checking testbench for des_control.
//
// Checks, cycle by cycle, the control outputs of one block: loaddata_s1 only
// in cycle 1, shifttwo_s1 = 0,0,1,1,1,1,1,1,0,1,1,1,1,1,1,0 over cycles 1..16,
// round_en in all 16 cycles, and out_valid exactly 16 cycles after the block
// was accepted. Then checks that a result not taken is held, that a new block
// is accepted in the same cycle the previous result is taken (throughput of
// one block per 16 cycles) and that the machine idles without input.
module tb_des_control;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid, in_ready, out_valid, out_ready;
  logic       loaddata_s1, shifttwo_s1, round_en;
  logic [3:0] round;
  int checks = 0;
  int failures = 0;

  des_control dut (.clk, .rst_n, .in_valid, .in_ready, .out_valid, .out_ready,
                   .loaddata_s1, .shifttwo_s1, .round_en, .round);

  always #5 clk = ~clk;

  localparam logic SHIFT2 [16] = '{0,0,1,1,1,1,1,1,0,1,1,1,1,1,1,0};

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Checks the 16 cycles of a block that starts in the current cycle.
  task automatic check_block();
    for (int c = 0; c < 16; c++) begin
      #1;
      check(loaddata_s1 == (c == 0), $sformatf("loaddata_s1 cycle %0d", c + 1));
      check(shifttwo_s1 == SHIFT2[c], $sformatf("shifttwo_s1 cycle %0d", c + 1));
      check(round_en, "round_en");
      check(round == 4'(c), "round number");
      if (c > 0) check(!out_valid, "no result during rounds");
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0; out_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    #1;
    check(in_ready && !out_valid && !round_en, "idle after reset");
    // Block 1, result held for 5 cycles.
    in_valid = 1'b1;
    check_block();
    for (int w = 0; w < 5; w++) begin
      #1;
      check(out_valid && !round_en && !in_ready, "result held while out_ready low");
      @(negedge clk);
    end
    // Take the result and start block 2 in the same cycle.
    out_ready = 1'b1;
    in_valid  = 1'b1;
    #1;
    check(out_valid && in_ready && loaddata_s1, "hand-over starts next block");
    check_block();
    // Take the result with no new block: back to idle.
    #1;
    check(out_valid, "block 2 done after 16 cycles");
    @(negedge clk);
    repeat (3) begin
      #1;
      check(!out_valid && !round_en && in_ready, "idle");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
