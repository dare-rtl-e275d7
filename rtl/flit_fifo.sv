// flit_fifo: small synchronous FIFO of flits, used as the input buffer of each
// router port. DEPTH entries (17 by default: one whole packet, head plus 16 body
// flits; the architecture does not give a depth). full and empty come straight
// from a registered count, so a router's in_ready never depends
// combinationally on anything downstream. Push and pop may happen in the same
// clock; a push into a full FIFO is ignored (the producer must watch full).
// free (also from the count) tells the upstream router how many flits fit.
module flit_fifo
  import dare_pkg::*;
#(
  parameter int unsigned DEPTH = 1 + KEY_W
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t din,
  input  logic  pop,
  output flit_t dout,
  output logic  empty,
  output logic  full,
  output logic [$clog2(DEPTH+1)-1:0] free   // empty slots
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t mem [DEPTH];
  logic [AW-1:0] rd, wr;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign free    = ($clog2(DEPTH+1))'(DEPTH) - count;
  assign dout    = mem[rd];
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd    <= '0;
      wr    <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_push) begin
        mem[wr] <= din;
        wr      <= (wr == AW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      end
      if (do_pop) rd <= (rd == AW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(do_push) - ($clog2(DEPTH+1))'(do_pop);
    end
  end

endmodule
