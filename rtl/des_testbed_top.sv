// des_testbed_top: DE2-board testbed around the iterative DES decryption circuit.
//
// Test vectors (a key and a ciphertext per entry) sit in a ROM. Pressing
// KEY[1] starts a run: the vector loader copies them into the input FIFO,
// the DES circuit pops one pair whenever it can start a block and pushes
// each plaintext into the output FIFO, and the result checker pops the
// plaintexts, compares them with a second ROM of expected values and counts
// passes and failures. The FIFOs decouple the three parts: the loader
// outruns the 16-cycle DES circuit and stalls on a full input FIFO, and
// holding SW[0] pauses the checker so that the output FIFO fills and the DES
// circuit waits with its result. Each vector carries its own key, so a run
// exercises key changes as well as data changes.
//
// Board interface (all inputs are synchronised to CLOCK_50):
//   KEY[0]  reset, active low (pressed)       KEY[1]  start a run (press)
//   SW[0]   pause the checker                 SW[3:2] 16-bit slice of the last
//   SW[4]   LEDR shows {pass, fail} counters          plaintext shown on LEDR
//   LEDG[0] run checked   LEDG[1] all passed   LEDG[2] a failure was seen
//   LEDG[3] run in progress  LEDG[4] input FIFO full  LEDG[5] output FIFO full
//   lcd_result / lcd_expected: last plaintext and its expected value, for
//   the board's character LCD driver, which is not part of this design.
// The lab fixes the structure (ROMs, FIFOs, DES circuit, LEDs and LCD,
// 50 MHz clock, SW and KEY inputs); the switch and LED assignments, the
// vector count and the FIFO depth are this design's choices.
module des_testbed_top
  import des_pkg::*;
#(
  parameter int unsigned NUM_VECTORS   = 8,
  parameter int unsigned FIFO_DEPTH    = 4,
  parameter string       INPUT_VECTORS = "rtl/des_input_vectors.hex",
  parameter string       EXPECTED      = "rtl/des_expected_vectors.hex"
) (
  input  logic        CLOCK_50,
  input  logic [3:0]  KEY,
  input  logic [17:0] SW,
  output logic [17:0] LEDR,
  output logic [8:0]  LEDG,
  output logic [63:0] lcd_result,
  output logic [63:0] lcd_expected
);

  localparam int unsigned AW = (NUM_VECTORS > 1) ? $clog2(NUM_VECTORS) : 1;

  logic clk;
  assign clk = CLOCK_50;

  // Reset: asserted asynchronously by KEY[0], released synchronously.
  logic [1:0] rst_sync;
  logic       rst_n, reset_button_n;
  assign reset_button_n = KEY[0];
  always_ff @(posedge clk or negedge reset_button_n) begin
    if (!reset_button_n) rst_sync <= 2'b00;
    else         rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n = rst_sync[1];

  // Start: a press (falling edge) of KEY[1]; pause: SW[0].
  logic [2:0] key1_sync;
  logic [1:0] pause_sync;
  logic       start;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key1_sync  <= 3'b111;
      pause_sync <= 2'b00;
    end else begin
      key1_sync  <= {key1_sync[1:0], KEY[1]};
      pause_sync <= {pause_sync[0], SW[0]};
    end
  end
  assign start = key1_sync[2] && !key1_sync[1];

  // Input side: vector ROM -> loader -> input FIFO.
  logic [AW-1:0] in_rom_addr;
  des_job_t      in_rom_q, in_fifo_rdata;
  logic          in_fifo_wr, in_fifo_full, in_fifo_rd, in_fifo_empty;
  logic          loader_done, loader_stall;
  logic [$clog2(FIFO_DEPTH):0] in_fifo_count, out_fifo_count;

  des_vector_rom #(.WIDTH(128), .DEPTH(NUM_VECTORS), .INIT_FILE(INPUT_VECTORS)) u_in_rom (
    .clk, .addr(in_rom_addr), .q(in_rom_q)
  );

  des_vector_loader #(.NUM_VECTORS(NUM_VECTORS)) u_loader (
    .clk, .rst_n, .start,
    .rom_addr(in_rom_addr),
    .fifo_full(in_fifo_full), .fifo_wr(in_fifo_wr),
    .done(loader_done), .full_stall(loader_stall)
  );

  des_fifo #(.WIDTH(128), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .wr_en(in_fifo_wr), .wr_data(in_rom_q), .full(in_fifo_full),
    .rd_en(in_fifo_rd), .rd_data(in_fifo_rdata), .empty(in_fifo_empty),
    .count(in_fifo_count)
  );

  // The system under test.
  logic        des_in_ready, des_out_valid, des_out_ready;
  logic [63:0] des_out_data;

  assign in_fifo_rd = des_in_ready && !in_fifo_empty;

  des_decrypt u_des (
    .clk, .rst_n,
    .in_valid (!in_fifo_empty),
    .in_ready (des_in_ready),
    .in_key   (in_fifo_rdata.key),
    .in_data  (in_fifo_rdata.data),
    .out_valid(des_out_valid),
    .out_ready(des_out_ready),
    .out_data (des_out_data)
  );

  // Output side: output FIFO -> checker, with the expected-value ROM.
  logic          out_fifo_full, out_fifo_empty, out_fifo_rd;
  logic [63:0]   out_fifo_rdata, exp_rom_q;
  logic [AW-1:0] exp_rom_addr;
  logic [7:0]    pass_count, fail_count;
  logic          checker_done;

  assign des_out_ready = !out_fifo_full;

  des_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .wr_en(des_out_valid && des_out_ready), .wr_data(des_out_data), .full(out_fifo_full),
    .rd_en(out_fifo_rd), .rd_data(out_fifo_rdata), .empty(out_fifo_empty),
    .count(out_fifo_count)
  );

  des_vector_rom #(.WIDTH(64), .DEPTH(NUM_VECTORS), .INIT_FILE(EXPECTED)) u_exp_rom (
    .clk, .addr(exp_rom_addr), .q(exp_rom_q)
  );

  des_result_checker #(.NUM_VECTORS(NUM_VECTORS)) u_checker (
    .clk, .rst_n, .start, .pause(pause_sync[1]),
    .rom_addr(exp_rom_addr), .rom_q(exp_rom_q),
    .fifo_empty(out_fifo_empty), .fifo_q(out_fifo_rdata), .fifo_rd(out_fifo_rd),
    .pass_count, .fail_count, .done(checker_done),
    .last_result(lcd_result), .last_expected(lcd_expected)
  );

  // LED display.
  logic [15:0] result_slice;
  always_comb begin
    unique case (SW[3:2])
      2'd0:    result_slice = lcd_result[15:0];
      2'd1:    result_slice = lcd_result[31:16];
      2'd2:    result_slice = lcd_result[47:32];
      default: result_slice = lcd_result[63:48];
    endcase
  end

  assign LEDR[15:0] = SW[4] ? {pass_count, fail_count} : result_slice;
  assign LEDR[16]   = loader_done;
  assign LEDR[17]   = loader_stall;
  assign LEDG[0]    = checker_done;
  assign LEDG[1]    = checker_done && (fail_count == 8'd0) && (pass_count == 8'(NUM_VECTORS));
  assign LEDG[2]    = (fail_count != 8'd0);
  assign LEDG[3]    = !checker_done && (!loader_done || !in_fifo_empty || !out_fifo_empty || des_out_valid);
  assign LEDG[4]    = in_fifo_full;
  assign LEDG[5]    = out_fifo_full;
  assign LEDG[8:6]  = {1'b0, in_fifo_count == '0, out_fifo_count == '0};

endmodule
