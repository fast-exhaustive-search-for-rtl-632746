// mq_pkg: constants and types shared by the exhaustive-search solver for
// quadratic systems over GF(2).
//
// The defaults are the main configuration: systems in 48 variables, 2^10
// parallel instances that clamp the top 10 variables, 12 equations screened
// with the Gray-code method, 42 more checked by full evaluation, two pillars
// with a bus each. Instance groups hold 4 instances, each bus segment has 4
// buffer slots with 4-bit push-back counters. The 64-bit configuration word,
// the record kinds and the FIFO depth are this design's own choices.
package mq_pkg;

  localparam int unsigned N_VARS_DEF    = 48;  // n
  localparam int unsigned LOG_INST_DEF  = 10;  // i: 2^i instances
  localparam int unsigned MG_DEF        = 12;  // Gray-code equations
  localparam int unsigned N_FE_DEF      = 42;  // full-evaluation equations
  localparam int unsigned N_PILLARS_DEF = 2;   // pillars (buses)
  localparam int unsigned GROUP         = 4;   // instances per group
  localparam int unsigned SLOTS         = 4;   // buffer slots per bus segment
  localparam int unsigned CNT_W         = 4;   // push-back counter width
  localparam int unsigned CFG_W         = 64;  // configuration data word
  localparam int unsigned LUT_W         = 64;  // bits per LUT-6 used as ROM
  localparam int unsigned FIFO_DEPTH_DEF = 16;

  // Targets of the configuration port.
  typedef enum logic [1:0] {
    CFG_D2   = 2'd0,  // second-derivative table word (addr = LUT index)
    CFG_INST = 2'd1,  // initial {y, d'} of one instance (addr = instance)
    CFG_FE   = 2'd2   // coefficient word of a full-evaluation equation
  } cfg_target_e;

  // Kinds of records sent to the host.
  typedef enum logic [1:0] {
    REC_SOLUTION = 2'd0,  // x satisfies every equation on the chip
    REC_OVERFLOW = 2'd1,  // a candidate was lost: all slots full; recheck step x for all instances
    REC_DELAYED  = 2'd2,  // push-back counter saturated: step of candidate is x or earlier
    REC_LOST     = 2'd3   // a FIFO was full: recheck step x for all instances
  } rec_kind_e;

  // Number of pairs (k, j) with k > j among k variables: k(k-1)/2.
  function automatic int unsigned tri_num(input int unsigned k);
    return (k * (k - 1)) / 2;
  endfunction

  function automatic int unsigned clog2_min1(input int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
