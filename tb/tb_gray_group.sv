// tb_gray_group: four instances of one random equation in 6 enumerated
// variables (shared quadratic part, different linear part and constant per
// instance) are walked through all 64 Gray-code steps, with idle cycles
// mixed in. After each live step, sol_out must be sol_in | f_l(gray(t)) for
// each lane l, evaluated directly; idle cycles must give all ones and leave
// the state alone; the step bundle must come out one cycle later.
module tb_gray_group;
  localparam int NL = 6;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [2:0] k1, k1o; logic e1, e2, v, d2, e1o, e2o, vo, d2o;
  logic [3:0] sol_in, sol_out;
  logic ld_we; logic [1:0] ld_lane; logic [NL:0] ld_data;

  gray_group #(.NL(NL)) dut (.clk, .rst_n, .k1_in(k1), .e1_in(e1), .e2_in(e2), .v_in(v),
    .d2_in(d2), .sol_in, .ld_we, .ld_lane, .ld_data,
    .k1_out(k1o), .e1_out(e1o), .e2_out(e2o), .v_out(vo), .d2_out(d2o), .sol_out);

  bit q [NL][NL];      // q[k][j], k > j, shared
  bit lin [4][NL];
  bit cst [4];

  function automatic bit f(int l, int x);
    bit r;
    r = cst[l];
    for (int k = 0; k < NL; k++) if (x[k]) begin
      r ^= lin[l][k];
      for (int j = 0; j < k; j++) if (x[j]) r ^= q[k][j];
    end
    return r;
  endfunction

  initial begin
    k1 = 0; e1 = 0; e2 = 0; v = 0; d2 = 0; sol_in = 0; ld_we = 0; ld_lane = 0; ld_data = 0;
    for (int k = 0; k < NL; k++) for (int j = 0; j < NL; j++) q[k][j] = 1'($urandom);
    for (int l = 0; l < 4; l++) begin
      cst[l] = 1'($urandom);
      for (int k = 0; k < NL; k++) lin[l][k] = 1'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 4; l++) begin
      ld_we = 1; ld_lane = 2'(l);
      ld_data[NL] = f(l, 0);
      for (int k = 0; k < NL; k++) begin
        int xb;
        xb = (1 << k) >> 1;
        ld_data[k] = f(l, xb) ^ f(l, xb ^ (1 << k));
      end
      @(negedge clk);
    end
    ld_we = 0;
    for (int t = 0; t < (1 << NL); t++) begin
      int p1, p2, n;
      logic [3:0] si, want;
      if ($urandom % 4 == 0) begin   // idle cycle
        v = 0; e1 = 1'($urandom); sol_in = 4'($urandom);
        @(negedge clk);
        checks++;
        if (sol_out !== 4'hF) begin failures++; $display("FAIL idle sol_out %b", sol_out); end
      end
      n = 0; p1 = 0; p2 = 0;
      for (int b = 0; b < NL; b++) if (t[b]) begin
        if (n == 0) p1 = b; else if (n == 1) p2 = b;
        n++;
      end
      si = 4'($urandom);
      v = 1; e1 = (n >= 1); e2 = (n >= 2); k1 = 3'(p1); d2 = (n >= 2) ? q[p2][p1] : 1'($urandom);
      sol_in = si;
      @(negedge clk);
      for (int l = 0; l < 4; l++) want[l] = si[l] | f(l, t ^ (t >> 1));
      checks++;
      if (sol_out !== want || k1o != k1 || e1o != e1 || e2o != e2 || !vo || d2o != d2) begin
        failures++; $display("FAIL step %0d sol_out %b want %b", t, sol_out, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
