// gray_tree: positions of the lowest and second-lowest set bits of the step.
//
// For step t of the Gray-code enumeration the variable that toggles is
// x[k1], k1 = position of the lowest set bit of t, and the first derivative
// of x[k1] changes by the second derivative with respect to x[k1] and x[k2],
// k2 = position of the second-lowest set bit. e1 / e2 say whether t has at
// least one / two set bits. The search is a divide-and-conquer tree: each
// leaf is one bit, and each node merges the (first, second) results of its
// lower and upper halves, so the depth is log2(NL) merges. The step's live
// flag v passes alongside. One register stage at the output (latency 1);
// the tree structure follows the source design, the single pipeline stage
// is this design's choice.
module gray_tree #(
  parameter int unsigned NL  = 38,
  localparam int unsigned KW = (NL <= 2) ? 1 : $clog2(NL)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NL-1:0] ctr,
  input  logic          v_in,
  output logic [KW-1:0] k1,
  output logic [KW-1:0] k2,
  output logic          e1,
  output logic          e2,
  output logic          v_out
);

  // Leaves padded to a power of two.
  localparam int unsigned LEVELS = (NL <= 1) ? 1 : $clog2(NL);
  localparam int unsigned LEAVES = 1 << LEVELS;

  typedef struct packed {
    logic          f_v;   // a first set bit exists
    logic [KW:0]   f_p;   // its position
    logic          s_v;   // a second set bit exists
    logic [KW:0]   s_p;   // its position
  } node_t;

  node_t tree [LEVELS+1][LEAVES];

  always_comb begin
    for (int unsigned l = 0; l <= LEVELS; l++)
      for (int unsigned p = 0; p < LEAVES; p++)
        tree[l][p] = '0;
    for (int unsigned p = 0; p < LEAVES; p++) begin
      tree[0][p].f_v = (p < NL) ? ctr[p] : 1'b0;
      tree[0][p].f_p = (KW+1)'(p);
    end
    for (int unsigned l = 1; l <= LEVELS; l++) begin
      for (int unsigned p = 0; p < (LEAVES >> l); p++) begin
        node_t lo, hi;
        lo = tree[l-1][2*p];
        hi = tree[l-1][2*p+1];
        if (lo.f_v) begin
          tree[l][p].f_v = 1'b1;
          tree[l][p].f_p = lo.f_p;
          if (lo.s_v) begin
            tree[l][p].s_v = 1'b1;
            tree[l][p].s_p = lo.s_p;
          end else begin
            tree[l][p].s_v = hi.f_v;
            tree[l][p].s_p = hi.f_p;
          end
        end else begin
          tree[l][p] = hi;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k1 <= '0; k2 <= '0; e1 <= 1'b0; e2 <= 1'b0; v_out <= 1'b0;
    end else begin
      k1    <= tree[LEVELS][0].f_p[KW-1:0];
      k2    <= tree[LEVELS][0].s_p[KW-1:0];
      e1    <= tree[LEVELS][0].f_v;
      e2    <= tree[LEVELS][0].s_v;
      v_out <= v_in;
    end
  end

endmodule
