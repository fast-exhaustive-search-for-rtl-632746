// tb_mq_harness: drives one mq_solver through complete runs on random
// systems and checks every record against a brute-force reference.
//
// For each trial it draws a random system of MG + N_FE quadratic equations
// in N_VARS variables, computes what a host loads (second-derivative
// tables, each instance's starting first derivatives and value, the
// full-evaluation coefficients), writes it through the configuration port,
// pulses start and collects records until done. Checks, per input x:
// a REC_SOLUTION record names a true common zero, at most once; every true
// common zero is reported or covered by a warning (REC_OVERFLOW covers its
// step for all instances, REC_DELAYED covers its instance at that step and
// earlier ones, fifo_lost covers the whole run). It also checks that the
// run lasts at least 2^NL cycles and ends within a bound, and counts how
// often each mechanism (push-back, overflow, saturated counter, merge
// competition, multi-candidate split, FIFO loss) occurred.
module tb_mq_harness #(
  parameter int unsigned N_VARS   = 12,
  parameter int unsigned LOG_INST = 4,
  parameter int unsigned MG       = 2,
  parameter int unsigned N_FE     = 3,
  parameter int unsigned TRIALS   = 2,
  parameter int unsigned SEED     = 1
) (
  input  logic clk,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_pushback, n_overflow, n_delayed, n_merge, n_multi, n_lost, n_solutions
);
  import mq_pkg::*;

  localparam int unsigned NL = N_VARS - LOG_INST;
  localparam int unsigned M  = MG + N_FE;
  localparam int unsigned NX = 1 << N_VARS;
  localparam int unsigned NI = 1 << LOG_INST;
  localparam int unsigned NS = 1 << NL;
  localparam int unsigned NQ = (N_VARS * (N_VARS - 1)) / 2 + N_VARS + 1;

  logic rst_n, cfg_we, start, busy, done, out_valid, fifo_lost;
  cfg_target_e cfg_target;
  logic [7:0]  cfg_eq;
  logic [15:0] cfg_addr;
  logic [63:0] cfg_data;
  rec_kind_e   out_kind;
  logic [N_VARS-1:0] out_x;
  logic ev_pb, ev_ovf, ev_mw, ev_multi;

  mq_solver #(.N_VARS(N_VARS), .LOG_INST(LOG_INST), .MG(MG), .N_FE(N_FE)) dut (
    .clk, .rst_n, .cfg_we, .cfg_target, .cfg_eq, .cfg_addr, .cfg_data,
    .start, .busy, .done, .out_valid, .out_kind, .out_x, .fifo_lost,
    .ev_pushback(ev_pb), .ev_overflow(ev_ovf), .ev_merge_wait(ev_mw), .ev_multi(ev_multi)
  );

  // the system: coefficient vector per equation, layout as in fe_equation
  logic [NQ-1:0] sys [M];

  function automatic int qidx(int k, int j);  // k > j
    return (k * (k - 1)) / 2 + j;
  endfunction

  function automatic bit eval_eq(int e, int unsigned x);
    bit r;
    r = sys[e][NQ-1];
    for (int k = 0; k < N_VARS; k++) begin
      if (x[k]) begin
        r ^= sys[e][(N_VARS * (N_VARS - 1)) / 2 + k];
        for (int j = 0; j < k; j++)
          if (x[j]) r ^= sys[e][qidx(k, j)];
      end
    end
    return r;
  endfunction

  bit reported [NX];
  bit covered  [NX];

  task automatic cfg_write(cfg_target_e t, int eq, int addr, logic [63:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_target = t; cfg_eq = 8'(eq); cfg_addr = 16'(addr); cfg_data = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic load_system();
    logic [63:0] w;
    int nt;
    nt = (NL * (NL - 1)) / 2;
    for (int e = 0; e < M; e++)
      for (int b = 0; b < NQ; b++) sys[e][b] = 1'($urandom);
    // second-derivative tables: bit addr(k2,k1) = a[k2][k1] for k2 > k1 < NL
    for (int e = 0; e < MG; e++)
      for (int wd = 0; wd * 64 < nt; wd++) begin
        w = '0;
        for (int b = 0; b < 64; b++)
          if (wd * 64 + b < nt) w[b] = sys[e][wd * 64 + b];
        cfg_write(CFG_D2, e, wd, w);
      end
    // per-instance starting state: derivative of x[v] at its first toggle
    for (int e = 0; e < MG; e++)
      for (int k = 0; k < NI; k++) begin
        int unsigned base;
        base = k << NL;
        w = '0;
        w[NL] = eval_eq(e, base);
        for (int v = 0; v < NL; v++) begin
          int unsigned xb;
          xb = base | ((1 << v) >> 1);   // gray(2^v - 1): only bit v-1 set
          w[v] = eval_eq(e, xb) ^ eval_eq(e, xb ^ (1 << v));
        end
        cfg_write(CFG_INST, e, k, w);
      end
    // full-evaluation coefficients
    for (int f = 0; f < N_FE; f++)
      for (int wd = 0; wd * 64 < NQ; wd++) begin
        w = '0;
        for (int b = 0; b < 64; b++)
          if (wd * 64 + b < NQ) w[b] = sys[MG + f][wd * 64 + b];
        cfg_write(CFG_FE, f, wd, w);
      end
  endtask

  function automatic int unsigned gray_inv(int unsigned g);
    int unsigned s;
    s = 0;
    for (int b = NL - 1; b >= 0; b--) s[b] = g[b] ^ ((b == NL - 1) ? 1'b0 : s[b+1]);
    return s;
  endfunction

  initial begin
    finished = 0; checks = 0; failures = 0;
    n_pushback = 0; n_overflow = 0; n_delayed = 0; n_merge = 0; n_multi = 0; n_lost = 0;
    n_solutions = 0;
    rst_n = 0; cfg_we = 0; start = 0; cfg_target = CFG_D2; cfg_eq = 0; cfg_addr = 0; cfg_data = 0;
    void'($urandom(SEED));
    wait (go);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < TRIALS; t++) begin
      int cyc, n_true, lost_run;
      load_system();
      for (int x = 0; x < NX; x++) begin reported[x] = 0; covered[x] = 0; end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1; lost_run = 0;
      while (!done) begin
        @(posedge clk);
        cyc++;
        if (ev_pb)    n_pushback++;
        if (ev_ovf)   n_overflow++;
        if (ev_mw)    n_merge++;
        if (ev_multi) n_multi++;
        if (fifo_lost) lost_run = 1;
        if (out_valid) begin
          case (out_kind)
            REC_SOLUTION: begin
              checks++;
              if (reported[out_x]) begin
                failures++; $display("duplicate solution %h", out_x);
              end
              reported[out_x] = 1;
              n_solutions++;
            end
            REC_OVERFLOW: begin
              int unsigned s;
              s = gray_inv(int'(out_x) & (NS - 1));
              for (int k = 0; k < NI; k++) covered[(k << NL) | (s ^ (s >> 1))] = 1;
            end
            REC_DELAYED: begin
              int unsigned s, k;
              n_delayed++;
              s = gray_inv(int'(out_x) & (NS - 1));
              k = int'(out_x) >> NL;
              for (int u = 0; u <= int'(s); u++) covered[(k << NL) | (u ^ (u >> 1))] = 1;
            end
            default: begin failures++; $display("bad record kind"); end
          endcase
        end
        @(negedge clk);
      end
      if (lost_run) n_lost++;
      // reference
      n_true = 0;
      for (int x = 0; x < NX; x++) begin
        bit truth;
        truth = 1;
        for (int e = 0; e < M; e++) if (eval_eq(e, x)) truth = 0;
        if (truth) n_true++;
        checks++;
        if (reported[x] && !truth) begin
          failures++; $display("false solution %h", x);
        end
        if (truth && !reported[x] && !covered[x] && !lost_run) begin
          failures++; $display("missed solution %h", x);
        end
      end
      // timing: all 2^NL steps, one per cycle, plus bounded drain
      checks++;
      if (cyc < int'(NS) || cyc > int'(NS) + 2000) begin
        failures++; $display("run took %0d cycles for %0d steps", cyc, NS);
      end
      $display("trial %0d: %0d true zeros, %0d cycles, lost=%0d", t, n_true, cyc, lost_run);
    end
    finished = 1;
  end

endmodule
