// tb_fe_equation: two chained full-evaluation units in 10 variables with
// random coefficients; random candidates go in every cycle. Two cycles
// after the first unit and four after the second, sol must be the OR of
// the incoming sol and the directly evaluated equations; x, kind and valid
// travel unchanged.
module tb_fe_equation;
  import mq_pkg::*;
  localparam int N = 10, NQ = N * (N - 1) / 2 + N + 1;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic we [2]; logic [0:0] word; logic [63:0] data;
  logic v0, v1, v2, s0, s1, s2; rec_kind_e k0, k1, k2; logic [N-1:0] x0, x1, x2;
  fe_equation #(.N(N)) u_a (.clk, .rst_n, .cfg_we(we[0]), .cfg_word(word), .cfg_data(data),
    .in_valid(v0), .in_kind(k0), .in_x(x0), .in_sol(s0),
    .out_valid(v1), .out_kind(k1), .out_x(x1), .out_sol(s1));
  fe_equation #(.N(N)) u_b (.clk, .rst_n, .cfg_we(we[1]), .cfg_word(word), .cfg_data(data),
    .in_valid(v1), .in_kind(k1), .in_x(x1), .in_sol(s1),
    .out_valid(v2), .out_kind(k2), .out_x(x2), .out_sol(s2));

  logic [NQ-1:0] co [2];

  function automatic bit f(int e, logic [N-1:0] x);
    bit r; int qb;
    qb = N * (N - 1) / 2;
    r = co[e][NQ-1];
    for (int k = 0; k < N; k++) if (x[k]) begin
      r ^= co[e][qb + k];
      for (int j = 0; j < k; j++) if (x[j]) r ^= co[e][k * (k - 1) / 2 + j];
    end
    return r;
  endfunction

  typedef struct { logic v; rec_kind_e k; logic [N-1:0] x; logic s; } in_t;
  in_t hist[$];

  initial begin
    we[0] = 0; we[1] = 0; word = 0; data = 0; v0 = 0; s0 = 0; k0 = REC_SOLUTION; x0 = 0;
    for (int e = 0; e < 2; e++) co[e] = {$urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 2; e++) begin
      we[e] = 1; word = 0; data = 64'(co[e]); @(negedge clk); we[e] = 0;
    end
    for (int c = 0; c < 1500; c++) begin
      v0 = 1'($urandom); s0 = ($urandom % 4 == 0); k0 = rec_kind_e'($urandom % 3); x0 = N'($urandom);
      hist.push_front('{v: v0, k: k0, x: x0, s: s0});
      @(negedge clk);
      if (hist.size() > 1) begin
        in_t h; h = hist[1];
        checks++;
        if (v1 != h.v || (h.v && (k1 != h.k || x1 != h.x || s1 != (h.s | f(0, h.x))))) begin
          failures++; $display("FAIL stage 1 cycle %0d", c);
        end
      end
      if (hist.size() > 3) begin
        in_t h; h = hist[3];
        checks++;
        if (v2 != h.v || (h.v && (x2 != h.x || s2 != (h.s | f(0, h.x) | f(1, h.x))))) begin
          failures++; $display("FAIL stage 2 cycle %0d", c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
