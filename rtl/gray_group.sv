// gray_group: a group of four Gray-code instances of one equation.
//
// The four instances share every input (same equation, same step) but clamp
// different values of the top variables, so each has its own first
// derivatives d'[0..NL-1] (one LUT-6 of distributed RAM on the original) and
// its own current value y of the equation. For a live step with e1 set:
//   d'[k1] <- d'[k1] ^ (e2 & d2)      (second derivative, if k2 is valid)
//   y      <- y ^ d'[k1]              (using the updated d'[k1])
// and the running "some equation is nonzero" word becomes sol_in | y, bit l
// for instance l. A live step without e1 (step 0) leaves the state alone and
// tests the initial y. When the step is not live the sol word is all ones,
// which the bus reads as "no candidate". The step bundle and d2 are buffered
// and passed to the next group one cycle later, and sol_out goes to the
// same group position of the next equation; latency 1 for everything.
// The update rules follow the source design. The load port (ld_we, ld_lane,
// ld_data = {y, d'}) that writes one instance's starting state replaces
// the original's compile-time initialisation; use it only between runs.
module gray_group #(
  parameter int unsigned NL  = 38,
  localparam int unsigned KW = (NL <= 2) ? 1 : $clog2(NL),
  localparam int unsigned G  = mq_pkg::GROUP
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [KW-1:0] k1_in,
  input  logic          e1_in,
  input  logic          e2_in,
  input  logic          v_in,
  input  logic          d2_in,
  input  logic [G-1:0]  sol_in,
  input  logic          ld_we,
  input  logic [1:0]    ld_lane,
  input  logic [NL:0]   ld_data,
  output logic [KW-1:0] k1_out,
  output logic          e1_out,
  output logic          e2_out,
  output logic          v_out,
  output logic          d2_out,
  output logic [G-1:0]  sol_out
);

  logic [NL-1:0] dp [G];   // first derivatives
  logic [G-1:0]  y;        // current value of the equation
  logic [G-1:0]  dp_new;   // updated d'[k1]
  logic [G-1:0]  y_new;
  logic          upd;

  assign upd = v_in && e1_in;

  always_comb begin
    for (int l = 0; l < G; l++) begin
      dp_new[l] = dp[l][k1_in] ^ (e2_in & d2_in);
      y_new[l]  = upd ? (y[l] ^ dp_new[l]) : y[l];
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < G; l++) begin
      if (ld_we && ld_lane == 2'(l)) begin
        dp[l] <= ld_data[NL-1:0];
        y[l]  <= ld_data[NL];
      end else if (upd) begin
        dp[l][k1_in] <= dp_new[l];
        y[l]         <= y_new[l];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k1_out <= '0; e1_out <= 1'b0; e2_out <= 1'b0; v_out <= 1'b0; d2_out <= 1'b0;
      sol_out <= '1;
    end else begin
      k1_out  <= k1_in;
      e1_out  <= e1_in;
      e2_out  <= e2_in;
      v_out   <= v_in;
      d2_out  <= d2_in;
      sol_out <= v_in ? (sol_in | y_new) : '1;
    end
  end

endmodule
