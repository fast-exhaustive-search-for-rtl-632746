// fe_equation: full evaluation of one quadratic equation on a candidate.
//
// f(x) = sum_{k>j} a[k][j] x[k] x[j] + sum_k a[k] x[k] + c over GF(2), for
// N variables. Coefficients are one flat vector: a[k][j] at k(k-1)/2 + j,
// then a[k] at N(N-1)/2 + k, then c at N(N-1)/2 + N; they are written as
// 64-bit words through cfg_we/cfg_word/cfg_data between runs.
// Two pipeline stages: stage 1 forms, for each k, the row term
//   r[k] = x[k] & (a[k] ^ XOR_{j<k} a[k][j] x[j])
// and registers the N row terms; stage 2 XORs them with c and ORs the
// result into the record's sol bit (sol = 1: some equation is nonzero).
// x, the record kind and valid travel alongside, so equations chain: the
// output of one feeds the next, latency 2 each. Chaining the equations and
// OR-ing sol follows the source design; the source maps the nonzero terms
// of one fixed system to LUT-6 trees, while this unit holds logic for every
// term so that any system can be loaded, which is this design's choice.
module fe_equation
  import mq_pkg::*;
#(
  parameter int unsigned N = 48,
  localparam int unsigned NQ = (N * (N - 1)) / 2 + N + 1,
  localparam int unsigned NWORDS = (NQ + mq_pkg::CFG_W - 1) / mq_pkg::CFG_W,
  localparam int unsigned WW = (NWORDS <= 2) ? 1 : $clog2(NWORDS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [WW-1:0]            cfg_word,
  input  logic [mq_pkg::CFG_W-1:0] cfg_data,
  input  logic                     in_valid,
  input  mq_pkg::rec_kind_e        in_kind,
  input  logic [N-1:0]             in_x,
  input  logic                     in_sol,
  output logic                     out_valid,
  output mq_pkg::rec_kind_e        out_kind,
  output logic [N-1:0]             out_x,
  output logic                     out_sol
);

  localparam int unsigned QBASE = (N * (N - 1)) / 2;

  logic [CFG_W-1:0] coef_w [NWORDS];
  logic [NWORDS*CFG_W-1:0] coef;
  always_comb
    for (int w = 0; w < NWORDS; w++) coef[w*CFG_W +: CFG_W] = coef_w[w];

  always_ff @(posedge clk)
    if (cfg_we && 32'(cfg_word) < NWORDS) coef_w[cfg_word] <= cfg_data;

  logic [N-1:0] row;
  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic acc;
      acc = coef[QBASE + k];
      for (int j = 0; j < k; j++)
        acc ^= coef[(k * (k - 1)) / 2 + j] & in_x[j];
      row[k] = in_x[k] & acc;
    end
  end

  // stage 1
  logic              s1_valid, s1_sol;
  mq_pkg::rec_kind_e s1_kind;
  logic [N-1:0]      s1_x, s1_row;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_sol <= 1'b0; s1_kind <= REC_SOLUTION; s1_x <= '0; s1_row <= '0;
      out_valid <= 1'b0; out_sol <= 1'b0; out_kind <= REC_SOLUTION; out_x <= '0;
    end else begin
      s1_valid <= in_valid; s1_sol <= in_sol; s1_kind <= in_kind; s1_x <= in_x;
      s1_row   <= row;
      out_valid <= s1_valid;
      out_kind  <= s1_kind;
      out_x     <= s1_x;
      out_sol   <= s1_sol | (^s1_row) ^ coef[QBASE + N];
    end
  end

endmodule
