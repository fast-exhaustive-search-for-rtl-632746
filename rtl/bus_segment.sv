// bus_segment: one segment of the candidate bus, serving one instance group.
//
// The bus word is {sol, id, cnt, warn}: the 4-bit sol word of a group (a 0
// bit marks an instance whose equations all evaluated to zero; all ones
// means the slot is empty), the group's id, the number of cycles the
// candidate was pushed back, and a warning bit. Every cycle each segment
// registers a word for the next segment, so a word crosses one segment per
// clock and an un-delayed candidate reaches the end of the bus after a
// latency that does not depend on which group produced it.
//
// The group's own results wait in SLOTS buffer slots, oldest first, each
// with a CNT_W-bit push-back counter. When the incoming bus word is empty
// the oldest waiting result (or, if none waits, the group's new result with
// count 0) is put on the bus ("step"); otherwise the bus word passes
// through. Every result left waiting has its counter raised by one,
// saturating at all ones (15), which later stages treat as an error. A new
// result that finds all slots full is dropped and the warning bit is set;
// the warning bit is ORed into whatever word leaves the segment. Latency 1.
// Slot count, counter width, the active-low empty code and the warning
// follow the source design; the bypass of an empty queue, raising the
// counters of waiting results also in cycles where the oldest one leaves,
// and the rule that the warning rides on any word are this design's choices.
module bus_segment #(
  parameter int unsigned GID_W = 8,
  parameter logic [GID_W-1:0] MY_ID = '0,
  localparam int unsigned G  = mq_pkg::GROUP,
  localparam int unsigned S  = mq_pkg::SLOTS,
  localparam int unsigned CW = mq_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [G-1:0]     sol,        // from the group, all ones = nothing
  input  logic [G-1:0]     bus_sol_in,
  input  logic [GID_W-1:0] bus_id_in,
  input  logic [CW-1:0]    bus_cnt_in,
  input  logic             bus_warn_in,
  output logic [G-1:0]     bus_sol_out,
  output logic [GID_W-1:0] bus_id_out,
  output logic [CW-1:0]    bus_cnt_out,
  output logic             bus_warn_out,
  output logic             pushed_back,  // a result is waiting in a slot (for statistics)
  output logic             overflow      // a result was dropped this cycle
);

  typedef struct packed {
    logic [G-1:0]  sol;
    logic [CW-1:0] cnt;
  } slot_t;

  localparam logic [CW-1:0] CNT_MAX = '1;

  slot_t q [S];
  logic [$clog2(S+1)-1:0] n;   // occupied slots

  slot_t q_nx [S];
  logic [$clog2(S+1)-1:0] n_nx;
  logic bus_free, new_c, send_own, ovf;
  slot_t head;

  function automatic logic [CW-1:0] inc_sat(input logic [CW-1:0] c);
    return (c == CNT_MAX) ? c : c + 1'b1;
  endfunction

  always_comb begin
    bus_free = (bus_sol_in == '1);
    new_c    = (sol != '1);
    send_own = bus_free && (n != 0 || new_c);
    head     = (n != 0) ? q[0] : slot_t'{sol: sol, cnt: '0};
    ovf      = 1'b0;
    for (int s = 0; s < S; s++) q_nx[s] = q[s];
    n_nx = n;
    // remove the head if it goes on the bus
    if (send_own && n != 0) begin
      for (int s = 0; s < S - 1; s++) q_nx[s] = q[s+1];
      q_nx[S-1] = '0;
      n_nx = n - 1'b1;
    end
    // results still waiting have been pushed back one more cycle
    for (int s = 0; s < S; s++)
      if (32'(s) < 32'(n_nx)) q_nx[s].cnt = inc_sat(q_nx[s].cnt);
    // the new result waits unless it went straight out
    if (new_c && !(send_own && n == 0)) begin
      if (32'(n_nx) < S) begin
        q_nx[n_nx[$clog2(S)-1:0]] = slot_t'{sol: sol, cnt: CW'(1)};
        n_nx = n_nx + 1'b1;
      end else begin
        ovf = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n <= '0;
      for (int s = 0; s < S; s++) q[s] <= '0;
      bus_sol_out  <= '1;
      bus_id_out   <= '0;
      bus_cnt_out  <= '0;
      bus_warn_out <= 1'b0;
    end else begin
      n <= n_nx;
      for (int s = 0; s < S; s++) q[s] <= q_nx[s];
      if (send_own) begin
        bus_sol_out <= head.sol;
        bus_id_out  <= MY_ID;
        bus_cnt_out <= head.cnt;
      end else begin
        bus_sol_out <= bus_sol_in;
        bus_id_out  <= bus_id_in;
        bus_cnt_out <= bus_cnt_in;
      end
      bus_warn_out <= bus_warn_in | ovf;
    end
  end

  // Never more waiting results than slots; a result is dropped only when all are taken.
  assert property (@(posedge clk) disable iff (!rst_n) 32'(n) <= S);
  assert property (@(posedge clk) disable iff (!rst_n) ovf |-> (32'(n) == S && !bus_free));

  assign pushed_back = (n != 0);
  assign overflow    = ovf;

endmodule
