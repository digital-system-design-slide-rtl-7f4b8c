// tb_des_result_checker: self-checking testbench for des_result_checker.
//
// An expected-value ROM model and a first-word-fall-through FIFO model feed
// the checker. The words pushed into the FIFO match the ROM except for two
// deliberately corrupted ones, pushed at random times; pause is toggled at
// random. Checked: the pass and fail counts (N-2 and 2), no read while
// empty or paused, the last result and expected words, done, and a second
// run after start clearing the counters (all words correct).
module tb_des_result_checker;

  localparam int unsigned N = 8;

  logic        clk = 1'b0;
  logic        rst_n, start, pause, fifo_empty, fifo_rd, done;
  logic [2:0]  rom_addr;
  logic [63:0] rom_q, fifo_q, last_result, last_expected;
  logic [7:0]  pass_count, fail_count;
  int checks = 0;
  int failures = 0;
  int pause_cycles = 0;

  des_result_checker #(.NUM_VECTORS(N)) dut (.clk, .rst_n, .start, .pause, .rom_addr, .rom_q,
    .fifo_empty, .fifo_q, .fifo_rd, .pass_count, .fail_count, .done, .last_result, .last_expected);

  always #5 clk = ~clk;

  function automatic logic [63:0] expected(input int i);
    return {32'hFACE0000 + 32'(i), 32'(i * 31337)};
  endfunction

  always_ff @(posedge clk) rom_q <= expected(int'(rom_addr));

  logic [63:0] fifo [$];
  task automatic update_fifo_outputs();
    fifo_empty = (fifo.size() == 0);
    fifo_q     = fifo_empty ? 64'h0 : fifo[0];
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
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
    rst_n = 0; start = 0; pause = 0;
    update_fifo_outputs();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int pushed;
      int cyc;
      logic rd_now;
      pushed = 0;
      cyc = 0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      #1;
      check(pass_count == 0 && fail_count == 0 && !done, "start clears the counters");
      while (!done && cyc < 800) begin
        pause = ($urandom_range(3) == 0);
        #1;
        if (pause) pause_cycles++;
        check(!(fifo_rd && (fifo_empty || pause)), "no read while empty or paused");
        rd_now = fifo_rd;
        @(posedge clk);
        #1;
        if (rd_now) void'(fifo.pop_front());
        if (pushed < N && $urandom_range(2) == 0) begin
          logic [63:0] w;
          w = expected(pushed);
          if (run == 0 && (pushed == 2 || pushed == 5)) w[pushed] = ~w[pushed];
          fifo.push_back(w);
          pushed++;
        end
        update_fifo_outputs();
        @(negedge clk);
        cyc++;
      end
      if (run == 0) begin
        check(pass_count == 8'(N - 2) && fail_count == 8'd2, "two failures counted");
      end else begin
        check(pass_count == 8'(N) && fail_count == 8'd0, "all pass");
      end
      check(done, "done");
      check(last_result == expected(N - 1) && last_expected == expected(N - 1), "last words kept");
    end
    check(pause_cycles > 0, "pause exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
