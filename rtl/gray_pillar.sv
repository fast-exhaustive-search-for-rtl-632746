// gray_pillar: one pillar of the Gray-code part and its candidate bus.
//
// A pillar is a grid of instance groups: MG equation columns by GROUPS
// rows. Row g of column j gets the step bundle of equation j (k1, e1, e2,
// v and that equation's second derivative d2) through the groups above it,
// one group per cycle, and gets the sol word of row g of column j-1, which
// was computed one cycle earlier because equation j's table lookup is itself
// one cycle later than equation j-1's. So every row sees the same step and
// the sol word of row g at the end of the last column is the OR of the
// MG equations for the four instances of that row. Each row then has a bus
// segment; segment g passes its word to segment g+1, and a candidate that is
// not pushed back leaves the end of the bus MG + GROUPS cycles after
// its step bundle entered column 0, whatever its row.
// Group ids on the bus are GID_BASE + g. The load port writes the starting
// state of instance ld_inst (4*row + lane) of equation ld_eq.
// The grid and bus follow the source design; the load port, the status
// outputs and the reset are this design's choices.
module gray_pillar #(
  parameter int unsigned NL       = 38,
  parameter int unsigned MG       = 12,
  parameter int unsigned GROUPS   = 128,
  parameter int unsigned GID_W    = 8,
  parameter int unsigned GID_BASE = 0,
  localparam int unsigned KW = (NL <= 2) ? 1 : $clog2(NL),
  localparam int unsigned G  = mq_pkg::GROUP,
  localparam int unsigned CW = mq_pkg::CNT_W,
  localparam int unsigned EW = (MG <= 2) ? 1 : $clog2(MG),
  localparam int unsigned IW = $clog2(GROUPS * G)
) (
  input  logic             clk,
  input  logic             rst_n,
  // step bundle of each equation, from its second-derivative table
  input  logic [KW-1:0]    k1  [MG],
  input  logic             e1  [MG],
  input  logic             e2  [MG],
  input  logic             v   [MG],
  input  logic             d2  [MG],
  // starting-state load
  input  logic             ld_we,
  input  logic [EW-1:0]    ld_eq,
  input  logic [IW-1:0]    ld_inst,
  input  logic [NL:0]      ld_data,
  // end of the bus
  output logic [G-1:0]     bus_sol,
  output logic [GID_W-1:0] bus_id,
  output logic [CW-1:0]    bus_cnt,
  output logic             bus_warn,
  // status
  output logic             any_pushed_back,
  output logic             any_overflow
);

  logic [KW-1:0] gk1 [MG][GROUPS];
  logic          ge1 [MG][GROUPS];
  logic          ge2 [MG][GROUPS];
  logic          gv  [MG][GROUPS];
  logic          gd2 [MG][GROUPS];
  logic [G-1:0]  gsol[MG][GROUPS];

  logic [G-1:0]     bsol [GROUPS];
  logic [GID_W-1:0] bid  [GROUPS];
  logic [CW-1:0]    bcnt [GROUPS];
  logic             bwarn[GROUPS];
  logic [GROUPS-1:0] pb, ovf;

  for (genvar j = 0; j < MG; j++) begin : g_eq
    for (genvar g = 0; g < GROUPS; g++) begin : g_row
      logic [KW-1:0] ik1;
      logic          ie1, ie2, iv, id2;
      logic [G-1:0]  isol;
      if (g == 0) begin : g_first
        assign ik1 = k1[j]; assign ie1 = e1[j]; assign ie2 = e2[j];
        assign iv  = v[j];  assign id2 = d2[j];
      end else begin : g_next
        assign ik1 = gk1[j][g-1]; assign ie1 = ge1[j][g-1]; assign ie2 = ge2[j][g-1];
        assign iv  = gv[j][g-1];  assign id2 = gd2[j][g-1];
      end
      if (j == 0) begin : g_sol0
        assign isol = '0;
      end else begin : g_soln
        assign isol = gsol[j-1][g];
      end
      gray_group #(.NL(NL)) u_grp (
        .clk, .rst_n,
        .k1_in(ik1), .e1_in(ie1), .e2_in(ie2), .v_in(iv), .d2_in(id2), .sol_in(isol),
        .ld_we  (ld_we && 32'(ld_eq) == j && 32'(ld_inst) / G == g),
        .ld_lane(2'(ld_inst)),
        .ld_data(ld_data),
        .k1_out(gk1[j][g]), .e1_out(ge1[j][g]), .e2_out(ge2[j][g]), .v_out(gv[j][g]),
        .d2_out(gd2[j][g]), .sol_out(gsol[j][g])
      );
    end
  end

  for (genvar g = 0; g < GROUPS; g++) begin : g_bus
    logic [G-1:0]     isol;
    logic [GID_W-1:0] iid;
    logic [CW-1:0]    icnt;
    logic             iwarn;
    if (g == 0) begin : g_head
      assign isol = '1; assign iid = '0; assign icnt = '0; assign iwarn = 1'b0;
    end else begin : g_link
      assign isol = bsol[g-1]; assign iid = bid[g-1]; assign icnt = bcnt[g-1];
      assign iwarn = bwarn[g-1];
    end
    bus_segment #(.GID_W(GID_W), .MY_ID(GID_W'(GID_BASE + g))) u_seg (
      .clk, .rst_n,
      .sol(gsol[MG-1][g]),
      .bus_sol_in(isol), .bus_id_in(iid), .bus_cnt_in(icnt), .bus_warn_in(iwarn),
      .bus_sol_out(bsol[g]), .bus_id_out(bid[g]), .bus_cnt_out(bcnt[g]),
      .bus_warn_out(bwarn[g]),
      .pushed_back(pb[g]), .overflow(ovf[g])
    );
  end

  assign bus_sol  = bsol[GROUPS-1];
  assign bus_id   = bid[GROUPS-1];
  assign bus_cnt  = bcnt[GROUPS-1];
  assign bus_warn = bwarn[GROUPS-1];
  assign any_pushed_back = |pb;
  assign any_overflow    = |ovf;

endmodule
