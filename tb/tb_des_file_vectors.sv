// tb_des_file_vectors: file-driven testbench for des_decrypt.
//
// Works the way a classic vector-file testbench does: it reads one line at a
// time from the input-vector file (key and ciphertext) and from the
// expected-value file (plaintext), applies the pair, waits until the engine
// reports its result, and prints the engine's output, the expected output
// and their difference (bitwise xor) before moving to the next line. The run
// ends at the end of the file. Each result must match and must appear
// exactly 16 clocks after the pair was accepted.
module tb_des_file_vectors;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid, in_ready, out_valid, out_ready;
  logic [63:0] in_key, in_data, out_data;
  int checks = 0;
  int failures = 0;

  des_decrypt dut (.clk, .rst_n, .in_valid, .in_ready, .in_key, .in_data,
                   .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          fin, fexp, n, lines, wait_cycles;
    logic [127:0] word;
    logic [63:0]  expected;
    rst_n = 0; in_valid = 0; out_ready = 1; in_key = '0; in_data = '0;
    lines = 0;
    fin  = $fopen("rtl/des_input_vectors.hex", "r");
    fexp = $fopen("rtl/des_expected_vectors.hex", "r");
    check(fin != 0 && fexp != 0, "vector files open");
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (fin != 0 && fexp != 0 && !$feof(fin)) begin
      n = $fscanf(fin, "%h\n", word);
      if (n != 1) break;
      n = $fscanf(fexp, "%h\n", expected);
      check(n == 1, "expected value present");
      {in_key, in_data} = word;
      in_valid = 1'b1;
      #1;
      check(in_ready, "engine ready for the next line");
      @(negedge clk);
      in_valid = 1'b0;
      wait_cycles = 1;
      while (!out_valid && wait_cycles < 100) begin
        @(negedge clk);
        wait_cycles++;
      end
      check(wait_cycles == 16, $sformatf("line %0d: result after %0d clocks", lines, wait_cycles));
      $display("key = %h  ciphertext = %h", in_key, in_data);
      $display("  engine output = %h  expected = %h  difference = %h",
               out_data, expected, out_data ^ expected);
      check(out_data == expected, $sformatf("line %0d", lines));
      @(negedge clk);  // result taken (out_ready is high)
      lines++;
    end
    check(lines == 8, "all eight lines applied");
    if (fin != 0) $fclose(fin);
    if (fexp != 0) $fclose(fexp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
