// tb_rr_merge: three input streams with random valid, random consumer
// ready. Checks that the offered input is the first valid one after the
// last granted (round-robin), that the data is that input's, that exactly
// the taken input is popped, and that no waiting input waits more than
// N grants.
module tb_rr_merge;
  localparam int N = 3, W = 8;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [N-1:0] iv, pop; logic [W-1:0] id [N]; logic ov, ordy, conf; logic [W-1:0] od;
  rr_merge #(.N(N), .WIDTH(W)) dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .in_pop(pop),
    .out_valid(ov), .out_data(od), .out_ready(ordy), .conflict(conf));

  int last = N - 1;
  int wait_grants [N];
  int n_conf = 0;

  initial begin
    iv = 0; ordy = 0;
    for (int i = 0; i < N; i++) begin id[i] = 0; wait_grants[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      int want; logic [N-1:0] wp;
      iv = N'($urandom); ordy = ($urandom % 4 != 0);
      for (int i = 0; i < N; i++) id[i] = W'(16 * i + c % 16);
      #1;
      want = -1;
      for (int k = 1; k <= N; k++) if (want < 0 && iv[(last + k) % N]) want = (last + k) % N;
      wp = '0;
      if (want >= 0 && ordy) wp[want] = 1;
      checks++;
      if (ov != (want >= 0) || (want >= 0 && od != id[want]) || pop != wp ||
          conf != ($countones(iv) > 1)) begin
        failures++; $display("FAIL c=%0d iv=%b want %0d pop %b", c, iv, want, pop);
      end
      if (conf) n_conf++;
      if (want >= 0 && ordy) begin
        for (int i = 0; i < N; i++) if (iv[i] && i != want) wait_grants[i]++;
        wait_grants[want] = 0;
        last = want;
        checks++;
        for (int i = 0; i < N; i++) if (wait_grants[i] >= N) begin
          failures++; $display("FAIL input %0d starved", i);
        end
      end
      for (int i = 0; i < N; i++) if (!iv[i]) wait_grants[i] = 0;
      @(negedge clk);
    end
    checks++;
    if (n_conf == 0) failures++;
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
