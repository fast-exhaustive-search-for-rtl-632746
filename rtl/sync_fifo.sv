// sync_fifo: single-clock FIFO for candidate records at the end of a bus.
//
// DEPTH entries of WIDTH bits in a circular buffer. The head is shown on
// dout whenever empty is low (first-word fall-through); pop removes it.
// A push while full is refused and pulses lost for that cycle; a push and
// a pop in the same cycle are both done, also when full. The source design
// only says that a FIFO buffers each bus; depth, fall-through read and the
// refusal rule are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned PW = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             lost
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd, wr;
  logic [PW:0]      cnt;
  logic             do_push, do_pop;

  function automatic logic [PW-1:0] nxt(input logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty   = (cnt == '0);
  assign full    = (32'(cnt) == DEPTH);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign lost    = push && !do_push;
  assign dout    = mem[rd];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; cnt <= '0;
    end else begin
      if (do_push) wr <= nxt(wr);
      if (do_pop)  rd <= nxt(rd);
      cnt <= cnt + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  // The occupancy never exceeds the depth, and a refused push only happens when full.
  assert property (@(posedge clk) disable iff (!rst_n) 32'(cnt) <= DEPTH);
  assert property (@(posedge clk) disable iff (!rst_n) lost |-> full);

endmodule
