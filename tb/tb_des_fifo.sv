// tb_des_fifo: self-checking testbench for des_fifo (first word fall through).
//
// A queue in the testbench is the reference. Random writes and reads run for
// 2000 cycles with a bias that alternates between filling and draining, so
// the FIFO reaches both full and empty many times. Checked every cycle: the
// head word on rd_data, full, empty and count. Writes are only issued when
// not full and reads when not empty, as the testbed's users do; the full
// case is entered by writing until full is seen.
module tb_des_fifo;

  localparam int unsigned W = 16;
  localparam int unsigned D = 4;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          wr_en, rd_en, full, empty;
  logic [W-1:0]  wr_data, rd_data;
  logic [$clog2(D):0] count;
  int checks = 0;
  int failures = 0;
  int times_full = 0, times_empty = 0, simultaneous = 0;

  des_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .full,
                                        .rd_en, .rd_data, .empty, .count);

  always #5 clk = ~clk;

  logic [W-1:0] model [$];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      // Compare state at the falling edge.
      check(count == ($clog2(D)+1)'(model.size()), "count");
      check(full == (model.size() == D), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(rd_data == model[0], "head word");
      if (full) times_full++;
      if (empty) times_empty++;
      // Choose the next operation.
      wr_en   = !full && ($urandom_range(99) < (((cyc / 50) % 2) ? 30 : 70));
      rd_en   = !empty && ($urandom_range(99) < (((cyc / 50) % 2) ? 70 : 30));
      wr_data = W'($urandom);
      if (wr_en && rd_en) simultaneous++;
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      @(negedge clk);
    end
    check(times_full > 0 && times_empty > 0 && simultaneous > 0, "full, empty and simultaneous access seen");
    $display("full=%0d empty=%0d simultaneous=%0d", times_full, times_empty, simultaneous);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
