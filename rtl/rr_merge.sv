// rr_merge: joins the candidate streams of the pillars into one.
//
// Each cycle, if any input FIFO is non-empty, one of them is granted in
// round-robin order, starting after the input granted last, and its head is
// offered on out_data with out_valid. The grant pops that FIFO when the
// consumer takes the record (out_valid && out_ready), so at most one record
// per cycle is merged and no input can be starved. Combinational from the
// FIFO heads to the output. Round-robin selection of one record per cycle
// follows the source design; the valid/ready handshake is this design's.
module rr_merge #(
  parameter int unsigned N     = 2,
  parameter int unsigned WIDTH = 64,
  localparam int unsigned NW = (N <= 2) ? 1 : $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     in_valid,
  input  logic [WIDTH-1:0] in_data [N],
  output logic [N-1:0]     in_pop,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data,
  input  logic             out_ready,
  output logic             conflict   // more than one input was waiting
);

  logic [NW-1:0] last, sel;

  // more than one bit set
  function automatic logic many(input logic [N-1:0] v);
    return (v & (v - 1'b1)) != '0;
  endfunction
  logic          found;

  always_comb begin
    sel   = last;
    found = 1'b0;
    for (int k = 1; k <= N; k++) begin
      logic [NW-1:0] idx;
      idx = NW'((32'(last) + k) % N);
      if (!found && in_valid[idx]) begin
        sel   = idx;
        found = 1'b1;
      end
    end
    out_valid = found;
    out_data  = in_data[sel];
    in_pop    = '0;
    if (found && out_ready) in_pop[sel] = 1'b1;
    conflict  = many(in_valid);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                      last <= NW'(N - 1);
    else if (out_valid && out_ready) last <= sel;
  end

  // At most one input is popped per cycle, and only a valid one.
  assert property (@(posedge clk) disable iff (!rst_n) !many(in_pop) && ((in_pop & ~in_valid) == '0));

endmodule
