// tb_lane_split: random records (0-4 candidate lanes, optional warning,
// optional saturated count) are offered with a valid/ready handshake. The
// outputs must be, in order, one record per candidate lane (lowest first,
// x = {gid, lane, x_cand}, kind DELAYED if saturated, else SOLUTION) and
// then, if warned, one OVERFLOW record with x = {0, x_now}; the unit must
// emit one record per cycle while busy.
module tb_lane_split;
  import mq_pkg::*;
  localparam int NL = 6, LI = 5, N = NL + LI;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic iv, ir, sat, warn, ov, multi; logic [3:0] lanes; logic [2:0] gid;
  logic [NL-1:0] xc, xn; rec_kind_e ok; logic [N-1:0] ox;
  lane_split #(.NL(NL), .LOG_INST(LI)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir),
    .in_lanes(lanes), .in_gid(gid), .in_sat(sat), .in_warn(warn), .in_x_cand(xc), .in_x_now(xn),
    .out_valid(ov), .out_kind(ok), .out_x(ox), .multi);

  typedef struct { rec_kind_e k; logic [N-1:0] x; } exp_t;
  exp_t q[$];
  int n_multi = 0, n_out = 0, idle_busy = 0;

  always @(posedge clk) if (rst_n) begin
    if (ov) begin
      n_out++;
      checks++;
      if (q.size() == 0 || q[0].k != ok || q[0].x != ox) begin
        failures++; $display("FAIL output %s %h", ok.name(), ox);
      end
      if (q.size() > 0) void'(q.pop_front());
    end
    if (multi) n_multi++;
  end

  initial begin
    iv = 0; lanes = 0; gid = 0; sat = 0; warn = 0; xc = 0; xn = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 500; r++) begin
      iv = 1; lanes = 4'($urandom); gid = 3'($urandom); sat = ($urandom % 6 == 0);
      warn = ($urandom % 5 == 0); xc = NL'($urandom); xn = NL'($urandom);
      if (lanes == 0) warn = 1;
      while (!ir) @(negedge clk);
      for (int l = 0; l < 4; l++) if (lanes[l])
        q.push_back('{k: sat ? REC_DELAYED : REC_SOLUTION, x: {gid, 2'(l), xc}});
      if (warn) q.push_back('{k: REC_OVERFLOW, x: {{LI{1'b0}}, xn}});
      @(negedge clk);
      iv = ($urandom % 3 == 0);  // sometimes a gap
      lanes = 4'($urandom); warn = 1;
      if (iv) begin
        // a record offered while busy must not be taken
        @(negedge clk);
        iv = 0;
      end
      if (!ir && !ov) idle_busy++;
    end
    iv = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_multi == 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
