// tb_des_testbed_top: end-to-end testbench of the DES testbed at its default size.
//
// Drives the board inputs like a user: holds KEY[0] for reset, presses KEY[1]
// to start a run of the eight vectors in the ROM. Run 1 goes at full speed;
// in run 2 SW[0] pauses the checker for a while, so the output FIFO fills
// and the DES circuit must hold its result. Checked:
//   - each plaintext the DES circuit hands to the output FIFO, against the
//     expected values typed in below (independent software DES);
//   - one block per 16 cycles while the DES circuit is never starved or
//     blocked, and 16 cycles from acceptance to result;
//   - the LEDs: all-passed, no failure, {pass, fail} = {8, 0} on LEDR, the
//     four 16-bit slices of the last plaintext, and the LCD words.
// Mechanisms counted, each must occur: input FIFO full (loader stalled),
// output FIFO full (DES result held), back-to-back blocks, DES waiting on an
// empty input FIFO, a key change between blocks, checker paused.
module tb_des_testbed_top;

  logic        CLOCK_50 = 1'b0;
  logic [3:0]  KEY;
  logic [17:0] SW;
  logic [17:0] LEDR;
  logic [8:0]  LEDG;
  logic [63:0] lcd_result, lcd_expected;
  int checks = 0;
  int failures = 0;

  des_testbed_top dut (.CLOCK_50, .KEY, .SW, .LEDR, .LEDG, .lcd_result, .lcd_expected);

  always #10 CLOCK_50 = ~CLOCK_50;  // 50 MHz

  localparam logic [63:0] PT [8] = '{
    64'h0123456789abcdef, 64'h8787878787878787, 64'h4e6f772069732074, 64'h8000000000000000,
    64'h01a1d6d039776742, 64'h5cd54ca83def57da, 64'h2e03d6fecd704dbf, 64'h5028d24cabb247ed
  };

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge CLOCK_50);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitors, sampled just before each rising edge.
  int cycle = 0;
  int n_out = 0, n_in = 0;
  int accept_cycle [8];
  int last_out_cycle = 0;
  logic [63:0] last_key = '0;
  int cnt_in_full = 0, cnt_out_full = 0, cnt_b2b = 0, cnt_starved = 0;
  int cnt_key_change = 0, cnt_pause = 0, cnt_result_held = 0;
  logic prev_out_valid = 1'b0;
  logic held_since_last = 1'b0;  // the last result had to wait
  logic was_starved = 1'b1;      // the block after the last result was not ready at once

  always @(negedge CLOCK_50) begin
    #9;
    if (dut.u_loader.full_stall) cnt_in_full++;
    if (dut.out_fifo_full) cnt_out_full++;
    if (dut.des_out_valid && !dut.des_out_ready) begin
      cnt_result_held++;
      held_since_last = 1'b1;
    end
    if (dut.u_checker.pause && dut.u_checker.state_q == 2'd2) cnt_pause++;
    if (dut.u_des.in_ready && !dut.u_des.in_valid && dut.rst_n) cnt_starved++;
    if (dut.des_out_valid && !prev_out_valid) begin
      check(cycle - accept_cycle[n_out % 8] == 16, "16 cycles from acceptance to result");
    end
    if (dut.des_out_valid && dut.des_out_ready) begin
      check(dut.des_out_data == PT[n_out % 8], $sformatf("plaintext %0d", n_out));
      if (dut.u_des.in_valid && n_out % 8 != 0 && !held_since_last && !was_starved) begin
        check(cycle - last_out_cycle == 16, "one block per 16 cycles");
        cnt_b2b++;
      end
      last_out_cycle = cycle;
      held_since_last = 1'b0;
      was_starved = !dut.u_des.in_valid;
      n_out++;
    end
    if (dut.u_des.in_valid && dut.u_des.in_ready) begin
      accept_cycle[n_in % 8] = cycle;
      if (n_in > 0 && dut.u_des.in_key != last_key) cnt_key_change++;
      last_key = dut.u_des.in_key;
      n_in++;
    end
    prev_out_valid = dut.des_out_valid && !dut.des_out_ready;
    cycle++;
  end

  task automatic press_start();
    KEY[1] = 1'b0;
    repeat (3) @(negedge CLOCK_50);
    KEY[1] = 1'b1;
  endtask

  task automatic check_leds(input int run);
    check(LEDG[0] && LEDG[1] && !LEDG[2], $sformatf("run %0d: done and all passed", run));
    SW[4] = 1'b1;
    #1;
    check(LEDR[15:0] == 16'h0800, $sformatf("run %0d: counters show 8 pass, 0 fail", run));
    SW[4] = 1'b0;
    for (int s = 0; s < 4; s++) begin
      SW[3:2] = 2'(s);
      #1;
      check(LEDR[15:0] == PT[7][16*s +: 16], "LED slice of the last plaintext");
    end
    check(lcd_result == PT[7] && lcd_expected == PT[7], "LCD words");
  endtask

  initial begin
    KEY = 4'b1110; SW = '0;
    repeat (4) @(negedge CLOCK_50);
    KEY[0] = 1'b1;
    repeat (4) @(negedge CLOCK_50);
    check(!LEDG[0] && !LEDG[2], "idle after reset");

    // Run 1: full speed.
    press_start();
    wait (LEDG[0]);
    @(negedge CLOCK_50);
    check(n_out == 8, "run 1 decrypted 8 blocks");
    check_leds(1);

    // Run 2: checker paused at first, so the output FIFO fills.
    SW[0] = 1'b1;
    press_start();
    repeat (150) @(negedge CLOCK_50);
    SW[0] = 1'b0;
    wait (LEDG[0]);
    @(negedge CLOCK_50);
    check(n_out == 16, "run 2 decrypted 8 more blocks");
    check_leds(2);

    check(cnt_in_full > 0,     "input FIFO full happened");
    check(cnt_out_full > 0,    "output FIFO full happened");
    check(cnt_result_held > 0, "DES result held on a full output FIFO");
    check(cnt_b2b > 0,         "back-to-back blocks happened");
    check(cnt_starved > 0,     "DES waited on an empty input FIFO");
    check(cnt_key_change > 0,  "key changed between blocks");
    check(cnt_pause > 0,       "checker paused");
    $display("in_full=%0d out_full=%0d held=%0d b2b=%0d starved=%0d key_change=%0d pause=%0d cycles=%0d",
             cnt_in_full, cnt_out_full, cnt_result_held, cnt_b2b, cnt_starved, cnt_key_change, cnt_pause, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
