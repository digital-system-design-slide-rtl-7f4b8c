// des_fifo: synchronous first-word-fall-through FIFO of the DES testbed.
//
// Two of these buffer the testbed traffic: one holds key/ciphertext pairs
// waiting for the DES circuit, the other holds decrypted words waiting for
// the checker. The storage is a DEPTH-word register array with read and
// write pointers and an occupancy counter. The word at the head is always
// visible on rd_data while empty is low (first word fall through), so a
// reader looks at rd_data and pops it with rd_en in the same cycle.
//
// Interface and timing: a write in a cycle with wr_en && !full stores
// wr_data at the clock edge; a read with rd_en && !empty removes the head at
// the edge. Both may happen in the same cycle. A write while full or a read
// while empty is ignored (and flagged by an assertion). full, empty and count
// are registered-state outputs.
// The FIFO's role and its full behaviour follow the lab; the depth, the
// first-word-fall-through mode and the reset are this design's choices.
module des_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full    = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
