// tb_des_vector_loader: self-checking testbench for des_vector_loader.
//
// A synchronous ROM model holds NUM_VECTORS distinct words; fifo_full is
// driven at random. Checked: the words written are the ROM words in address
// order, each exactly once; nothing is written while full; full_stall marks
// the cycles where a word waits on a full FIFO; done rises after the last
// word; a second start repeats the run.
module tb_des_vector_loader;
  import des_pkg::*;

  localparam int unsigned N = 6;

  logic       clk = 1'b0;
  logic       rst_n, start, fifo_full, fifo_wr, done, full_stall;
  logic [2:0] rom_addr;
  des_job_t   rom_q;
  int checks = 0;
  int failures = 0;
  int stall_cycles = 0;

  des_vector_loader #(.NUM_VECTORS(N)) dut (.clk, .rst_n, .start, .rom_addr,
    .fifo_full, .fifo_wr, .done, .full_stall);

  always #5 clk = ~clk;

  function automatic des_job_t word(input int i);
    return '{key: {32'hC0DE0000 + 32'(i), 32'h5A5A5A5A}, data: {32'(i * 977), ~32'(i)}};
  endfunction

  always_ff @(posedge clk) rom_q <= word(int'(rom_addr));

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
    rst_n = 0; start = 0; fifo_full = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int n_written;
      int cyc;
      n_written = 0;
      cyc = 0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done && cyc < 500) begin
        fifo_full = ($urandom_range(2) == 0);
        #1;
        check(!(fifo_wr && fifo_full), "no write while full");
        if (full_stall) begin
          stall_cycles++;
          check(fifo_full, "full_stall only when full");
        end
        if (fifo_wr) begin
          check(rom_q == word(n_written), $sformatf("word %0d", n_written));
          n_written++;
        end
        @(negedge clk);
        cyc++;
      end
      check(done && n_written == N, $sformatf("run %0d wrote %0d words", run, n_written));
    end
    check(stall_cycles > 0, "full stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
