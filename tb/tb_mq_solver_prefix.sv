// tb_mq_solver_prefix: the solver at its default size (48 variables, 1024
// instances, 12 Gray-code and 42 fully evaluated equations, two pillars)
// on a random 54-equation system with planted common zeros, over the first
// S_RUN steps of a run (S_RUN * 1024 inputs; a whole run is 2^38 steps).
// The planted zeros are made by solving, per equation, a small GF(2) system
// for the constant and a few linear coefficients. Checks: every planted
// zero inside the window is reported, every reported solution inside the
// window satisfies all 54 equations, every common zero inside the window
// (found by brute force over its inputs) is reported or covered by a
// warning, and the first record arrives no earlier than the pipeline depth.
module tb_mq_solver_prefix;
  import mq_pkg::*;
  localparam int N = N_VARS_DEF, LI = LOG_INST_DEF, NL = N - LI;
  localparam int MGL = MG_DEF, NFE = N_FE_DEF, M = MGL + NFE;
  localparam int NI = 1 << LI;
  localparam int S_RUN = 256;
  localparam int NP = 3;                  // planted zeros
  localparam int NQ = N * (N - 1) / 2 + N + 1;
  localparam int QB = N * (N - 1) / 2;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic cfg_we, start, busy, done, out_valid, fifo_lost, ev_pb, ev_ovf, ev_mw, ev_multi;
  cfg_target_e cfg_target; logic [7:0] cfg_eq; logic [15:0] cfg_addr; logic [63:0] cfg_data;
  rec_kind_e out_kind; logic [N-1:0] out_x;

  mq_solver dut (.clk, .rst_n, .cfg_we, .cfg_target, .cfg_eq, .cfg_addr, .cfg_data,
    .start, .busy, .done, .out_valid, .out_kind, .out_x, .fifo_lost,
    .ev_pushback(ev_pb), .ev_overflow(ev_ovf), .ev_merge_wait(ev_mw), .ev_multi(ev_multi));

  // equation e: row[e][k] = mask of j < k with a[k][j] = 1; lin, cst
  logic [N-1:0] row [M][N];
  logic [N-1:0] lin [M];
  logic         cst [M];

  function automatic bit f(int e, logic [N-1:0] x);
    bit r;
    r = cst[e] ^ (^(lin[e] & x));
    for (int k = 1; k < N; k++) if (x[k]) r ^= ^(row[e][k] & x);
    return r;
  endfunction

  function automatic logic [NL-1:0] gray(int unsigned s);
    logic [NL-1:0] u; u = NL'(s);
    return u ^ (u >> 1);
  endfunction

  function automatic longint unsigned gray_inv(logic [NL-1:0] g);
    logic [NL-1:0] s;
    s[NL-1] = g[NL-1];
    for (int b = NL - 2; b >= 0; b--) s[b] = g[b] ^ s[b+1];
    return longint'(s);
  endfunction

  task automatic cfg_write(cfg_target_e t, int eq, int addr, logic [63:0] d);
    cfg_we = 1'b1; cfg_target = t; cfg_eq = 8'(eq); cfg_addr = 16'(addr); cfg_data = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic bit coef(int e, int b);
    if (b < QB) begin
      int k, j;
      k = 1;
      while ((k + 1) * k / 2 <= b) k++;
      j = b - k * (k - 1) / 2;
      return row[e][k][j];
    end else if (b < QB + N) return lin[e][b - QB];
    else return cst[e];
  endfunction

  logic [N-1:0] planted [NP];

  // make f_e zero on every planted point by changing cst and lin[0..6]
  task automatic plant(int e);
    bit mtx [NP][9];   // 8 unknowns (cst, lin[0..6]) and rhs
    int piv [NP];
    for (int p = 0; p < NP; p++) begin
      mtx[p][0] = 1;
      for (int u = 0; u < 7; u++) mtx[p][u+1] = planted[p][u];
      mtx[p][8] = f(e, planted[p]);
    end
    for (int p = 0; p < NP; p++) begin
      piv[p] = -1;
      for (int u = 0; u < 8 && piv[p] < 0; u++) if (mtx[p][u]) piv[p] = u;
      if (piv[p] >= 0)
        for (int r = 0; r < NP; r++) if (r != p && mtx[r][piv[p]])
          for (int u = 0; u < 9; u++) mtx[r][u] ^= mtx[p][u];
    end
    for (int p = 0; p < NP; p++) begin
      if (piv[p] < 0) begin
        if (mtx[p][8]) $display("planting failed for equation %0d", e);
      end else if (mtx[p][8]) begin
        if (piv[p] == 0) cst[e] ^= 1'b1; else lin[e][piv[p]-1] ^= 1'b1;
      end
    end
  endtask

  bit found [NI][S_RUN];
  bit cover_step [S_RUN];
  bit cover_inst [NI];

  initial begin
    int cyc, first_rec, n_sol, n_true;
    cfg_we = 0; start = 0; cfg_target = CFG_D2; cfg_eq = 0; cfg_addr = 0; cfg_data = 0;
    for (int e = 0; e < M; e++) begin
      for (int k = 0; k < N; k++) begin
        row[e][k] = {$urandom, $urandom};
        row[e][k] &= (N'(1) << k) - 1'b1;
      end
      lin[e] = {$urandom, $urandom}; cst[e] = 1'($urandom);
    end
    for (int p = 0; p < NP; p++)
      planted[p] = {LI'($urandom % NI), gray(($urandom % S_RUN))};
    for (int e = 0; e < M; e++) plant(e);
    for (int p = 0; p < NP; p++)
      for (int e = 0; e < M; e++) if (f(e, planted[p])) $display("planted point %0d not a zero", p);
    for (int k = 0; k < NI; k++) begin
      cover_inst[k] = 0;
      for (int s = 0; s < S_RUN; s++) found[k][s] = 0;
    end
    for (int s = 0; s < S_RUN; s++) cover_step[s] = 0;

    repeat (2) @(negedge clk);
    rst_n = 1;
    // tables: bit k2(k2-1)/2 + k1 = a[k2][k1], k2 < NL
    for (int e = 0; e < MGL; e++)
      for (int w = 0; w * 64 < NL * (NL - 1) / 2; w++) begin
        logic [63:0] d; d = '0;
        for (int b = 0; b < 64; b++) if (w * 64 + b < NL * (NL - 1) / 2) d[b] = coef(e, w * 64 + b);
        cfg_write(CFG_D2, e, w, d);
      end
    // instance starting states from the reduced linear part
    for (int e = 0; e < MGL; e++)
      for (int k = 0; k < NI; k++) begin
        logic [63:0] d; logic [N-1:0] xb; logic [N-1:0] hi;
        hi = N'(k) << NL;
        d = '0;
        d[NL] = f(e, hi);
        for (int v = 0; v < NL; v++) begin
          bit lv;
          lv = lin[e][v];
          for (int b = 0; b < LI; b++) if (hi[NL + b]) lv ^= row[e][NL + b][v];
          d[v] = lv ^ ((v > 0) ? row[e][v][v-1] : 1'b0);
        end
        cfg_write(CFG_INST, e, k, d);
      end
    for (int e = 0; e < NFE; e++)
      for (int w = 0; w * 64 < NQ; w++) begin
        logic [63:0] d; d = '0;
        for (int b = 0; b < 64; b++) if (w * 64 + b < NQ) d[b] = coef(MGL + e, w * 64 + b);
        cfg_write(CFG_FE, e, w, d);
      end

    start = 1; @(negedge clk); start = 0;
    cyc = 1; first_rec = -1; n_sol = 0;
    while (cyc < S_RUN + 600) begin
      @(posedge clk); #1;
      cyc++;
      if (out_valid) begin
        longint unsigned s;
        int k;
        s = gray_inv(out_x[NL-1:0]);
        k = int'(out_x[N-1:NL]);
        if (first_rec < 0) first_rec = cyc;
        if (s < S_RUN) begin
          case (out_kind)
            REC_SOLUTION: begin
              n_sol++;
              checks++;
              for (int e = 0; e < M; e++) if (f(e, out_x)) begin
                failures++; $display("false solution %h", out_x); break;
              end
              found[k][s] = 1;
            end
            REC_OVERFLOW: cover_step[s] = 1;
            default:      cover_inst[k] = 1;
          endcase
        end
      end
      @(negedge clk);
    end
    // brute force over the window
    n_true = 0;
    for (int k = 0; k < NI; k++)
      for (int s = 0; s < S_RUN; s++) begin
        logic [N-1:0] x; bit z;
        x = {LI'(k), gray(s)};
        z = 1;
        for (int e = 0; e < M && z; e++) if (f(e, x)) z = 0;
        if (z) begin
          n_true++;
          checks++;
          if (!found[k][s] && !cover_step[s] && !cover_inst[k] && !fifo_lost) begin
            failures++; $display("missed zero %h", x);
          end
        end
      end
    checks++;
    if (n_true < NP) begin failures++; $display("planted zeros missing from the window"); end
    // pipeline depth: counter, tree, address, MG tables, bus, counter2, FIFO, split, N_FE stages
    checks++;
    if (first_rec >= 0 && first_rec < 3 + MGL + NI / 4 / 2 + 2 * NFE) begin
      failures++; $display("first record after %0d cycles", first_rec);
    end
    $display("window of %0d steps: %0d zeros, %0d reported, first record at cycle %0d",
             S_RUN, n_true, n_sol, first_rec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
