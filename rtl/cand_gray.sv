// cand_gray: counter2 and Gray-code conversion at the end of a bus.
//
// Because the Gray-code part is fully pipelined, the step a bus word
// belongs to follows from the cycle in which it leaves the bus. counter2
// runs one step per clock, DELAY cycles behind the enumeration counter: on
// the start pulse it is loaded with -DELAY (mod 2^NL), so that it reads t
// in the cycle in which words of step t leave the bus. It keeps counting
// after the run, so late words still get their step. A candidate pushed
// back by cnt cycles belongs to step ctr2 - cnt, and its enumerated
// variables are x = s ^ (s >> 1) for that step s. A warning belongs to the
// step that is leaving now, ctr2.
// Output record (registered, latency 1): valid when the word holds a
// candidate or a warning; lanes = instances of the group that are
// candidates (active high); sat when the push-back count is saturated, in
// which case the true step is x_cand's step or earlier.
// counter2 and the Gray formula follow the source design; undoing the push-
// back by subtraction and carrying both step values are this design's.
module cand_gray #(
  parameter int unsigned NL    = 38,
  parameter int unsigned GID_W = 8,
  parameter int unsigned DELAY = 143,
  localparam int unsigned G  = mq_pkg::GROUP,
  localparam int unsigned CW = mq_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [G-1:0]     bus_sol,
  input  logic [GID_W-1:0] bus_id,
  input  logic [CW-1:0]    bus_cnt,
  input  logic             bus_warn,
  output logic             rec_valid,
  output logic [G-1:0]     rec_lanes,
  output logic [GID_W-1:0] rec_gid,
  output logic             rec_sat,
  output logic             rec_warn,
  output logic [NL-1:0]    rec_x_cand,
  output logic [NL-1:0]    rec_x_now
);

  logic [NL-1:0] ctr2, s_cand;

  function automatic logic [NL-1:0] gray(input logic [NL-1:0] s);
    return s ^ (s >> 1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n)      ctr2 <= '0;
    else if (start)  ctr2 <= NL'(0) - NL'(DELAY);
    else             ctr2 <= ctr2 + 1'b1;
  end

  assign s_cand = ctr2 - NL'(bus_cnt);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rec_valid <= 1'b0; rec_lanes <= '0; rec_gid <= '0; rec_sat <= 1'b0;
      rec_warn <= 1'b0; rec_x_cand <= '0; rec_x_now <= '0;
    end else begin
      rec_valid  <= (bus_sol != '1) || bus_warn;
      rec_lanes  <= ~bus_sol;
      rec_gid    <= bus_id;
      rec_sat    <= (bus_cnt == '1) && (bus_sol != '1);
      rec_warn   <= bus_warn;
      rec_x_cand <= gray(s_cand);
      rec_x_now  <= gray(ctr2);
    end
  end

endmodule
