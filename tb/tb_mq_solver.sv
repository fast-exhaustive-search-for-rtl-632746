// tb_mq_solver: end-to-end test of the solver at two reduced sizes.
//
// A "flood" configuration (12 variables, 16 instances, only 2 Gray-code
// equations) produces a candidate for a quarter of all inputs, far beyond
// what the buses are built for, so push-back, slot overflow, saturated
// counters, merge competition, multi-candidate groups and FIFO loss all
// occur; results must still be correct or covered by a warning. A "sparse"
// configuration (14 variables, 16 instances, 6 Gray-code equations) loads
// each bus with about 1/8 candidate per cycle, the rate of the full-size
// design, and must find every common zero. Each mechanism must happen at
// least once across the two.
module tb_mq_solver;
  logic clk = 0;
  always #5 clk = ~clk;

  logic go = 0;
  logic fin_a, fin_b;
  int ca, fa, cb, fb;
  int pb_a, ov_a, dl_a, mw_a, mu_a, lo_a, so_a;
  int pb_b, ov_b, dl_b, mw_b, mu_b, lo_b, so_b;
  int checks, failures;

  tb_mq_harness #(.N_VARS(12), .LOG_INST(4), .MG(2), .N_FE(3), .TRIALS(2), .SEED(11)) u_flood (
    .clk, .go, .finished(fin_a), .checks(ca), .failures(fa),
    .n_pushback(pb_a), .n_overflow(ov_a), .n_delayed(dl_a), .n_merge(mw_a), .n_multi(mu_a),
    .n_lost(lo_a), .n_solutions(so_a)
  );
  tb_mq_harness #(.N_VARS(14), .LOG_INST(4), .MG(6), .N_FE(4), .TRIALS(2), .SEED(7)) u_sparse (
    .clk, .go, .finished(fin_b), .checks(cb), .failures(fb),
    .n_pushback(pb_b), .n_overflow(ov_b), .n_delayed(dl_b), .n_merge(mw_b), .n_multi(mu_b),
    .n_lost(lo_b), .n_solutions(so_b)
  );

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-28s happened %0d times", what, n);
    if (n == 0) begin failures++; $display("mechanism %s never happened", what); end
  endtask

  initial begin
    checks = 0; failures = 0;
    #20 go = 1;
    wait (fin_a && fin_b);
    checks += ca + cb;
    failures += fa + fb;
    need("bus push-back", pb_a + pb_b);
    need("slot overflow warning", ov_a + ov_b);
    need("saturated push-back counter", dl_a + dl_b);
    need("merge competition", mw_a + mw_b);
    need("multi-candidate group split", mu_a + mu_b);
    need("FIFO loss", lo_a + lo_b);
    need("solution reported", so_a + so_b);
    need("push-back at the nominal rate", pb_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
