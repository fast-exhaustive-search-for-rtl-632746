// mq_solver: exhaustive search for the common zeros of a quadratic system
// over GF(2), with 2^LOG_INST Gray-code instances screening MG equations
// every clock and a chain of N_FE fully evaluated equations checking the
// candidates that survive.
//
// Data path (one enumeration step per clock, fully pipelined):
//   enum_counter -> gray_tree -> addr_calc -> d2_table x MG (one per
//   Gray-code equation, each one cycle after the previous) -> N_PILLARS
//   gray_pillar grids of MG x GROUPS_PP instance groups with one bus each ->
//   cand_gray (counter2, Gray code of the candidate's step) -> sync_fifo per
//   pillar -> rr_merge -> lane_split -> fe_equation x N_FE -> out.
// Instance k (0 <= k < 2^LOG_INST) enumerates x[NL-1:0], NL = N_VARS -
// LOG_INST, with the top variables clamped to x[N_VARS-1:NL] = k. The host
// loads, for each Gray-code equation, its second-derivative table (the
// coefficients a[k2][k1], k2 > k1 < NL) and, for each instance, the starting
// first derivatives and value of that equation restricted to the instance's
// clamped values; and for each fully evaluated equation its coefficients.
// All loading goes through one port (cfg_we, cfg_target, cfg_eq, cfg_addr,
// cfg_data) while no run is active. A start pulse then enumerates all
// 2^NL steps in 2^NL cycles. Each out_valid cycle carries one record:
//   REC_SOLUTION  x satisfies all MG + N_FE equations;
//   REC_OVERFLOW  a candidate was dropped (bus slots full): recheck every
//                 instance at the step whose Gray code is x[NL-1:0];
//   REC_DELAYED   a candidate waited 15 or more cycles: x names its instance
//                 and the latest step it can belong to; recheck that
//                 instance at that step and earlier ones.
// fifo_lost is set (until the next start) if a FIFO refused a record; the
// run must then be redone. done rises once the last step has left every
// stage. Latency from a step to its record: 3 + MG + GROUPS_PP + 1 + FIFO
// + merge/split + 2*N_FE cycles, plus any push-back.
// The structure and the sizes follow the source design; the load port,
// record kinds, status outputs and reset are this design's own choices.
module mq_solver
  import mq_pkg::*;
#(
  parameter int unsigned N_VARS     = N_VARS_DEF,
  parameter int unsigned LOG_INST   = LOG_INST_DEF,
  parameter int unsigned MG         = MG_DEF,
  parameter int unsigned N_FE       = N_FE_DEF,
  parameter int unsigned N_PILLARS  = N_PILLARS_DEF,
  parameter int unsigned FIFO_DEPTH = FIFO_DEPTH_DEF,
  localparam int unsigned NL        = N_VARS - LOG_INST,
  localparam int unsigned N_GROUPS  = (1 << LOG_INST) / GROUP,
  localparam int unsigned GROUPS_PP = N_GROUPS / N_PILLARS,
  localparam int unsigned GID_W     = LOG_INST - 2,
  localparam int unsigned KW        = (NL <= 2) ? 1 : $clog2(NL),
  localparam int unsigned NT        = (NL * (NL - 1)) / 2,
  localparam int unsigned AW        = (NT <= 2) ? 1 : $clog2(NT),
  localparam int unsigned D2_WORDS  = (NT + LUT_W - 1) / LUT_W,
  localparam int unsigned D2_WW     = (D2_WORDS <= 2) ? 1 : $clog2(D2_WORDS),
  localparam int unsigned NQ        = (N_VARS * (N_VARS - 1)) / 2 + N_VARS + 1,
  localparam int unsigned FE_WORDS  = (NQ + CFG_W - 1) / CFG_W,
  localparam int unsigned FE_WW     = (FE_WORDS <= 2) ? 1 : $clog2(FE_WORDS),
  localparam int unsigned EW        = (MG <= 2) ? 1 : $clog2(MG),
  localparam int unsigned IW_PP     = $clog2(GROUPS_PP * GROUP),
  localparam int unsigned DELAY     = 3 + MG + GROUPS_PP,
  localparam int unsigned REC_W     = GROUP + GID_W + 2 + 2 * NL
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  logic                cfg_we,
  input  cfg_target_e         cfg_target,
  input  logic [7:0]          cfg_eq,
  input  logic [15:0]         cfg_addr,
  input  logic [CFG_W-1:0]    cfg_data,
  // run control
  input  logic                start,
  output logic                busy,
  output logic                done,
  // records to the host
  output logic                out_valid,
  output rec_kind_e           out_kind,
  output logic [N_VARS-1:0]   out_x,
  output logic                fifo_lost,
  // activity, one bit per cycle, for statistics
  output logic                ev_pushback,    // some bus segment holds a waiting result
  output logic                ev_overflow,    // some bus segment dropped a result
  output logic                ev_merge_wait,  // several FIFOs competed in the merge
  output logic                ev_multi        // a record with several candidates was split
);

  // ---------------------------------------------------------------- front end
  logic [NL-1:0] ctr;
  logic          ctr_v, ctr_done;
  enum_counter #(.NL(NL)) u_ctr (
    .clk, .rst_n, .start, .ctr, .valid(ctr_v), .done(ctr_done)
  );

  logic [KW-1:0] t_k1, t_k2;
  logic          t_e1, t_e2, t_v;
  gray_tree #(.NL(NL)) u_tree (
    .clk, .rst_n, .ctr, .v_in(ctr_v),
    .k1(t_k1), .k2(t_k2), .e1(t_e1), .e2(t_e2), .v_out(t_v)
  );

  logic [AW-1:0] a_addr [MG+1];
  logic [KW-1:0] a_k1   [MG+1];
  logic          a_e1   [MG+1];
  logic          a_e2   [MG+1];
  logic          a_v    [MG+1];
  addr_calc #(.NL(NL)) u_addr (
    .clk, .rst_n, .k1_in(t_k1), .k2_in(t_k2), .e1_in(t_e1), .e2_in(t_e2), .v_in(t_v),
    .addr(a_addr[0]), .k1_out(a_k1[0]), .e1_out(a_e1[0]), .e2_out(a_e2[0]), .v_out(a_v[0])
  );

  // ------------------------------------------------- second-derivative tables
  logic d2 [MG];
  logic [KW-1:0] s_k1 [MG];
  logic          s_e1 [MG], s_e2 [MG], s_v [MG];
  for (genvar j = 0; j < MG; j++) begin : g_tab
    d2_table #(.NL(NL)) u_tab (
      .clk, .rst_n,
      .addr_in(a_addr[j]), .k1_in(a_k1[j]), .e1_in(a_e1[j]), .e2_in(a_e2[j]), .v_in(a_v[j]),
      .cfg_we  (cfg_we && cfg_target == CFG_D2 && 32'(cfg_eq) == j),
      .cfg_word(D2_WW'(cfg_addr)),
      .cfg_data(cfg_data),
      .addr_out(a_addr[j+1]), .k1_out(a_k1[j+1]), .e1_out(a_e1[j+1]), .e2_out(a_e2[j+1]),
      .v_out(a_v[j+1]), .d2(d2[j])
    );
    assign s_k1[j] = a_k1[j+1];
    assign s_e1[j] = a_e1[j+1];
    assign s_e2[j] = a_e2[j+1];
    assign s_v[j]  = a_v[j+1];
  end

  // ------------------------------------------------------- pillars and buses
  logic [N_PILLARS-1:0]   f_empty, f_pop, p_pb, p_ovf, f_lost;
  logic [REC_W-1:0]       f_dout [N_PILLARS];

  for (genvar p = 0; p < N_PILLARS; p++) begin : g_pil
    logic [GROUP-1:0] bsol;
    logic [GID_W-1:0] bid;
    logic [CNT_W-1:0] bcnt;
    logic             bwarn;
    gray_pillar #(.NL(NL), .MG(MG), .GROUPS(GROUPS_PP), .GID_W(GID_W),
                  .GID_BASE(p * GROUPS_PP)) u_pil (
      .clk, .rst_n,
      .k1(s_k1), .e1(s_e1), .e2(s_e2), .v(s_v), .d2(d2),
      .ld_we  (cfg_we && cfg_target == CFG_INST && 32'(cfg_addr) / (GROUPS_PP * GROUP) == p),
      .ld_eq  (EW'(cfg_eq)),
      .ld_inst(IW_PP'(cfg_addr)),
      .ld_data(cfg_data[NL:0]),
      .bus_sol(bsol), .bus_id(bid), .bus_cnt(bcnt), .bus_warn(bwarn),
      .any_pushed_back(p_pb[p]), .any_overflow(p_ovf[p])
    );

    logic             r_valid, r_sat, r_warn;
    logic [GROUP-1:0] r_lanes;
    logic [GID_W-1:0] r_gid;
    logic [NL-1:0]    r_xc, r_xn;
    cand_gray #(.NL(NL), .GID_W(GID_W), .DELAY(DELAY)) u_cg (
      .clk, .rst_n, .start,
      .bus_sol(bsol), .bus_id(bid), .bus_cnt(bcnt), .bus_warn(bwarn),
      .rec_valid(r_valid), .rec_lanes(r_lanes), .rec_gid(r_gid), .rec_sat(r_sat),
      .rec_warn(r_warn), .rec_x_cand(r_xc), .rec_x_now(r_xn)
    );

    sync_fifo #(.WIDTH(REC_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push(r_valid), .din({r_lanes, r_gid, r_sat, r_warn, r_xc, r_xn}),
      .pop(f_pop[p]), .dout(f_dout[p]), .empty(f_empty[p]), .full(),
      .lost(f_lost[p])
    );
  end

  // ----------------------------------------------------------- merge, split
  logic             m_valid, m_ready;
  logic [REC_W-1:0] m_data;
  rr_merge #(.N(N_PILLARS), .WIDTH(REC_W)) u_merge (
    .clk, .rst_n, .in_valid(~f_empty), .in_data(f_dout), .in_pop(f_pop),
    .out_valid(m_valid), .out_data(m_data), .out_ready(m_ready), .conflict(ev_merge_wait)
  );

  logic [GROUP-1:0] m_lanes;
  logic [GID_W-1:0] m_gid;
  logic             m_sat, m_warn;
  logic [NL-1:0]    m_xc, m_xn;
  assign {m_lanes, m_gid, m_sat, m_warn, m_xc, m_xn} = m_data;

  logic              c_valid [N_FE+1];
  rec_kind_e         c_kind  [N_FE+1];
  logic [N_VARS-1:0] c_x     [N_FE+1];
  logic              c_sol   [N_FE+1];

  lane_split #(.NL(NL), .LOG_INST(LOG_INST)) u_split (
    .clk, .rst_n, .in_valid(m_valid), .in_ready(m_ready),
    .in_lanes(m_lanes), .in_gid(m_gid), .in_sat(m_sat), .in_warn(m_warn),
    .in_x_cand(m_xc), .in_x_now(m_xn),
    .out_valid(c_valid[0]), .out_kind(c_kind[0]), .out_x(c_x[0]), .multi(ev_multi)
  );
  assign c_sol[0] = 1'b0;  // the Gray-code equations all evaluated to zero

  // ------------------------------------------------------- full evaluation
  for (genvar e = 0; e < N_FE; e++) begin : g_fe
    fe_equation #(.N(N_VARS)) u_fe (
      .clk, .rst_n,
      .cfg_we  (cfg_we && cfg_target == CFG_FE && 32'(cfg_eq) == e),
      .cfg_word(FE_WW'(cfg_addr)),
      .cfg_data(cfg_data),
      .in_valid(c_valid[e]), .in_kind(c_kind[e]), .in_x(c_x[e]), .in_sol(c_sol[e]),
      .out_valid(c_valid[e+1]), .out_kind(c_kind[e+1]), .out_x(c_x[e+1]), .out_sol(c_sol[e+1])
    );
  end

  assign out_valid = c_valid[N_FE] && (c_kind[N_FE] != REC_SOLUTION || !c_sol[N_FE]);
  assign out_kind  = c_kind[N_FE];
  assign out_x     = c_x[N_FE];

  // ------------------------------------------------------- status and done
  logic fe_busy;
  always_comb begin
    fe_busy = 1'b0;
    for (int e = 0; e <= N_FE; e++) fe_busy |= c_valid[e];
  end

  localparam int unsigned DRAIN = DELAY + SLOTS * GROUPS_PP + 8;
  logic [$clog2(DRAIN+1)-1:0] drain;
  logic running;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      drain <= '0; running <= 1'b0; fifo_lost <= 1'b0;
    end else begin
      if (start) begin
        running   <= 1'b1;
        fifo_lost <= 1'b0;
        drain     <= ($clog2(DRAIN+1))'(DRAIN);
      end else begin
        if (ctr_v)           drain <= ($clog2(DRAIN+1))'(DRAIN);
        else if (drain != 0) drain <= drain - 1'b1;
        if (|f_lost)         fifo_lost <= 1'b1;
        if (running && ctr_done && drain == 0 && &f_empty && m_ready && !fe_busy)
          running <= 1'b0;
      end
    end
  end

  assign busy        = running;
  assign done        = !running && ctr_done;
  assign ev_pushback = |p_pb;
  assign ev_overflow = |p_ovf;

endmodule
