// tb_gray_pillar: a pillar of 2 equations x 3 instance groups (12
// instances, 8 enumerated variables) runs all 256 steps of a random system.
// The step bundle of equation j is driven j cycles after equation 0's, as
// the tables do. A bus word leaving at cycle c with push-back count n must
// belong to step c - (MG + GROUPS) - n; its lane mask must be exactly the
// instances of that group where both equations are zero. Every such group
// result must leave the bus, unless a warning covers its step. This checks
// the grid, the bus and the pillar latency MG + GROUPS together.
module tb_gray_pillar;
  localparam int NL = 8, MG = 2, GR = 3, GB = 2, NI = GR * 4, NS = 1 << NL;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [2:0] k1 [MG]; logic e1 [MG], e2 [MG], v [MG], d2 [MG];
  logic ld_we; logic [0:0] ld_eq; logic [3:0] ld_inst; logic [NL:0] ld_data;
  logic [3:0] bsol, bid, bcnt; logic bwarn, apb, aovf;

  gray_pillar #(.NL(NL), .MG(MG), .GROUPS(GR), .GID_W(4), .GID_BASE(GB)) dut (
    .clk, .rst_n, .k1, .e1, .e2, .v, .d2, .ld_we, .ld_eq, .ld_inst, .ld_data,
    .bus_sol(bsol), .bus_id(bid), .bus_cnt(bcnt), .bus_warn(bwarn),
    .any_pushed_back(apb), .any_overflow(aovf));

  bit q [MG][NL][NL];
  bit lin [MG][NI][NL];
  bit cst [MG][NI];
  bit seen [NS][GR];
  bit warned [NS];

  function automatic bit f(int e, int i, int x);
    bit r;
    r = cst[e][i];
    for (int k = 0; k < NL; k++) if (x[k]) begin
      r ^= lin[e][i][k];
      for (int j = 0; j < k; j++) if (x[j]) r ^= q[e][k][j];
    end
    return r;
  endfunction

  function automatic logic [3:0] want_mask(int s, int g);
    logic [3:0] m;
    for (int l = 0; l < 4; l++) m[l] = !f(0, 4*g+l, s ^ (s >> 1)) && !f(1, 4*g+l, s ^ (s >> 1));
    return m;
  endfunction

  int cyc = 0;
  int n_delayed = 0;
  initial begin
    for (int j = 0; j < MG; j++) begin k1[j] = 0; e1[j] = 0; e2[j] = 0; v[j] = 0; d2[j] = 0; end
    ld_we = 0; ld_eq = 0; ld_inst = 0; ld_data = 0;
    for (int e = 0; e < MG; e++) for (int k = 0; k < NL; k++) for (int j = 0; j < NL; j++) q[e][k][j] = 1'($urandom);
    for (int e = 0; e < MG; e++) for (int i = 0; i < NI; i++) begin
      cst[e][i] = 1'($urandom);
      for (int k = 0; k < NL; k++) lin[e][i][k] = 1'($urandom);
    end
    for (int s = 0; s < NS; s++) begin warned[s] = 0; for (int g = 0; g < GR; g++) seen[s][g] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < MG; e++) for (int i = 0; i < NI; i++) begin
      ld_we = 1; ld_eq = 1'(e); ld_inst = 4'(i);
      ld_data[NL] = f(e, i, 0);
      for (int k = 0; k < NL; k++) begin
        int xb; xb = (1 << k) >> 1;
        ld_data[k] = f(e, i, xb) ^ f(e, i, xb ^ (1 << k));
      end
      @(negedge clk);
    end
    ld_we = 0;
    // drive: at cycle c, equation j gets step c - j
    for (int c = 0; c < NS + MG + GR + 80; c++) begin
      for (int j = 0; j < MG; j++) begin
        int t, n, p1, p2;
        t = c - j;
        n = 0; p1 = 0; p2 = 0;
        if (t >= 0 && t < NS) for (int b = 0; b < NL; b++) if (t[b]) begin
          if (n == 0) p1 = b; else if (n == 1) p2 = b;
          n++;
        end
        v[j] = (t >= 0 && t < NS); e1[j] = (n >= 1); e2[j] = (n >= 2); k1[j] = 3'(p1);
        d2[j] = (n >= 2) ? q[j][p2][p1] : 1'b0;
      end
      @(posedge clk); #1;
      // word now at the bus end belongs to column-0 cycle c - (MG + GR) + 1 - cnt
      if (bsol != 4'hF) begin
        int s, g;
        s = c + 1 - (MG + GR) - int'(bcnt);
        g = int'(bid) - GB;
        checks++;
        if (bcnt == 4'hF) n_delayed++;
        else if (s < 0 || s >= NS || g < 0 || g >= GR || ~bsol != want_mask(s, g) || seen[s][g]) begin
          failures++; $display("FAIL word at cycle %0d: step %0d group %0d mask %b", c, s, g, ~bsol);
        end else seen[s][g] = 1;
      end
      if (bwarn) begin
        int s; s = c + 1 - (MG + GR);
        if (s >= 0 && s < NS) warned[s] = 1;
      end
      @(negedge clk);
    end
    for (int s = 0; s < NS; s++) for (int g = 0; g < GR; g++) begin
      checks++;
      if (want_mask(s, g) != 0 && !seen[s][g] && !warned[s] && n_delayed == 0) begin
        failures++; $display("FAIL step %0d group %0d never left the bus", s, g);
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
