// lane_split: resolves collisions inside an instance group.
//
// A merged record can carry up to four candidates (one per instance of the
// group that produced it) plus a warning. This unit takes one record when
// it is idle (in_valid && in_ready) and then emits one output per cycle:
// first one per candidate lane, lowest lane first, then one for the warning.
// A candidate's full input is x = {instance index, x_cand} where the
// instance index 4*gid + lane is the value of the clamped top variables
// x[N-1:N-LOG_INST] and x_cand the Gray code of its step. Its kind is
// REC_SOLUTION, or REC_DELAYED if the push-back count had saturated. The
// warning becomes a REC_OVERFLOW record with x = {0, x_now}: every instance
// at that step must be rechecked. Output is registered; a record with k
// outputs keeps the unit busy k cycles. The source design only says that
// such collisions are resolved after the FIFOs; the one-per-cycle order,
// the record kinds and the handshake are this design's choices.
module lane_split
  import mq_pkg::*;
#(
  parameter int unsigned NL       = 38,
  parameter int unsigned LOG_INST = 10,
  localparam int unsigned GID_W = LOG_INST - 2,
  localparam int unsigned N     = NL + LOG_INST,
  localparam int unsigned G     = mq_pkg::GROUP
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [G-1:0]        in_lanes,
  input  logic [GID_W-1:0]    in_gid,
  input  logic                in_sat,
  input  logic                in_warn,
  input  logic [NL-1:0]       in_x_cand,
  input  logic [NL-1:0]       in_x_now,
  output logic                out_valid,
  output mq_pkg::rec_kind_e   out_kind,
  output logic [N-1:0]        out_x,
  output logic                multi    // the accepted record had several candidates
);

  logic [G-1:0]     lanes;
  logic [GID_W-1:0] gid;
  logic             sat, warn;
  logic [NL-1:0]    x_cand, x_now;
  logic [1:0]       lane;

  assign in_ready = (lanes == '0) && !warn;

  always_comb begin
    lane = '0;
    for (int l = G - 1; l >= 0; l--)
      if (lanes[l]) lane = 2'(l);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lanes <= '0; gid <= '0; sat <= 1'b0; warn <= 1'b0; x_cand <= '0; x_now <= '0;
      out_valid <= 1'b0; out_kind <= REC_SOLUTION; out_x <= '0; multi <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      multi     <= 1'b0;
      if (in_ready) begin
        if (in_valid) begin
          lanes <= in_lanes; gid <= in_gid; sat <= in_sat; warn <= in_warn;
          x_cand <= in_x_cand; x_now <= in_x_now;
          multi <= (in_lanes & (in_lanes - 1'b1)) != '0;
        end
      end else if (lanes != '0) begin
        out_valid    <= 1'b1;
        out_kind     <= sat ? REC_DELAYED : REC_SOLUTION;
        out_x        <= {gid, lane, x_cand};
        lanes[lane]  <= 1'b0;
      end else begin
        out_valid <= 1'b1;
        out_kind  <= REC_OVERFLOW;
        out_x     <= {{LOG_INST{1'b0}}, x_now};
        warn      <= 1'b0;
      end
    end
  end

  // A record is only taken when the unit is idle, and an idle unit emits nothing next cycle.
  assert property (@(posedge clk) disable iff (!rst_n) (in_valid && in_ready) |=> !out_valid);

endmodule
