// des_vector_loader: feeds the test vectors of the DES testbed into the input FIFO.
//
// On start it walks the input-vector ROM from address 0 to NUM_VECTORS-1.
// For each address it waits one cycle for the synchronous ROM (FETCH), then
// offers the key/ciphertext word to the FIFO (WRITE) and writes it as soon
// as the FIFO is not full. While the FIFO is full the word is held and
// full_stall is high: this is the FIFO full behaviour the testbed must
// respect, since the FIFO ignores writes when full. After the last word
// done stays high until the next start.
// Interface: start is a one-cycle pulse; rom_addr drives the ROM, whose
// output is wired straight to the FIFO's data input; fifo_wr is the FIFO
// write enable, high in a cycle where the ROM word for rom_addr is valid and
// the FIFO has room. One word per two cycles at best.
// The sequencing is this design's own; the lab gives only the block's role.
module des_vector_loader #(
  parameter int unsigned NUM_VECTORS = 8
) (
  input  logic                                           clk,
  input  logic                                           rst_n,
  input  logic                                           start,
  output logic [(NUM_VECTORS > 1 ? $clog2(NUM_VECTORS) : 1)-1:0] rom_addr,
  input  logic                                           fifo_full,
  output logic                                           fifo_wr,
  output logic                                           done,
  output logic                                           full_stall
);

  localparam int unsigned AW = (NUM_VECTORS > 1) ? $clog2(NUM_VECTORS) : 1;

  typedef enum logic [1:0] {
    L_IDLE,
    L_FETCH,
    L_WRITE,
    L_DONE
  } state_t;

  state_t        state_q;
  logic [AW-1:0] idx_q;

  assign rom_addr   = idx_q;
  assign fifo_wr    = (state_q == L_WRITE) && !fifo_full;
  assign full_stall = (state_q == L_WRITE) && fifo_full;
  assign done       = (state_q == L_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= L_IDLE;
      idx_q   <= '0;
    end else if (start) begin
      state_q <= L_FETCH;
      idx_q   <= '0;
    end else begin
      unique case (state_q)
        L_IDLE:  ;
        L_FETCH: state_q <= L_WRITE;
        L_WRITE: if (!fifo_full) begin
          if (idx_q == AW'(NUM_VECTORS - 1)) begin
            state_q <= L_DONE;
          end else begin
            idx_q   <= idx_q + AW'(1);
            state_q <= L_FETCH;
          end
        end
        L_DONE:  ;
        default: state_q <= L_IDLE;
      endcase
    end
  end

endmodule
