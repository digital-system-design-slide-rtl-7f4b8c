// des_result_checker: compares the decrypted words of the DES testbed with the expected plaintext.
//
// On start the checker clears its counters and walks the expected-plaintext
// ROM from address 0. For each address it waits one cycle for the
// synchronous ROM (FETCH), then waits until the output FIFO holds a word and
// pause is low (WAIT). It pops the head of the first-word-fall-through FIFO,
// compares it with the expected word and counts a pass or a failure. The
// last word read and its expected value are kept for the display. After
// NUM_VECTORS words done stays high until the next start.
// Interface: start is a one-cycle pulse; pause stops reading (so the output
// FIFO fills up and the DES circuit has to wait); fifo_rd is the FIFO read
// enable. The counters saturate at 255.
// The sequencing and the pause input are this design's own; the lab gives
// only the role of the block (results shown on LEDs and LCD).
module des_result_checker #(
  parameter int unsigned NUM_VECTORS = 8
) (
  input  logic                                           clk,
  input  logic                                           rst_n,
  input  logic                                           start,
  input  logic                                           pause,
  output logic [(NUM_VECTORS > 1 ? $clog2(NUM_VECTORS) : 1)-1:0] rom_addr,
  input  logic [63:0]                                    rom_q,
  input  logic                                           fifo_empty,
  input  logic [63:0]                                    fifo_q,
  output logic                                           fifo_rd,
  output logic [7:0]                                     pass_count,
  output logic [7:0]                                     fail_count,
  output logic                                           done,
  output logic [63:0]                                    last_result,
  output logic [63:0]                                    last_expected
);

  localparam int unsigned AW = (NUM_VECTORS > 1) ? $clog2(NUM_VECTORS) : 1;

  typedef enum logic [1:0] {
    C_IDLE,
    C_FETCH,
    C_WAIT,
    C_DONE
  } state_t;

  state_t        state_q;
  logic [AW-1:0] idx_q;

  assign rom_addr = idx_q;
  assign fifo_rd  = (state_q == C_WAIT) && !fifo_empty && !pause;
  assign done     = (state_q == C_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= C_IDLE;
      idx_q         <= '0;
      pass_count    <= '0;
      fail_count    <= '0;
      last_result   <= '0;
      last_expected <= '0;
    end else if (start) begin
      state_q    <= C_FETCH;
      idx_q      <= '0;
      pass_count <= '0;
      fail_count <= '0;
    end else begin
      unique case (state_q)
        C_IDLE:  ;
        C_FETCH: state_q <= C_WAIT;
        C_WAIT: if (fifo_rd) begin
          last_result   <= fifo_q;
          last_expected <= rom_q;
          if (fifo_q == rom_q) begin
            if (pass_count != 8'hFF) pass_count <= pass_count + 8'd1;
          end else begin
            if (fail_count != 8'hFF) fail_count <= fail_count + 8'd1;
          end
          if (idx_q == AW'(NUM_VECTORS - 1)) begin
            state_q <= C_DONE;
          end else begin
            idx_q   <= idx_q + AW'(1);
            state_q <= C_FETCH;
          end
        end
        C_DONE:  ;
        default: state_q <= C_IDLE;
      endcase
    end
  end

endmodule
