// addr_calc: address of the second derivative d''[k2][k1] in the tables.
//
// The tables store d''[k2][k1] for every pair k2 > k1 of enumerated
// variables in the order addr = k2*(k2-1)/2 + k1, so the address is the
// triangular number of k2 plus k1. The triangular number is taken from a
// constant table indexed by k2 (NL entries), then added to k1. It is only
// meaningful when e2 is set; when it is not the address is don't-care and
// the instances ignore the looked-up bit. One register stage (latency 1);
// k1, e1, e2 and the live flag v pass alongside. The formula follows the
// source design, the constant table and the single stage are this design's.
module addr_calc #(
  parameter int unsigned NL  = 38,
  localparam int unsigned KW = (NL <= 2) ? 1 : $clog2(NL),
  localparam int unsigned AW = ((NL * (NL - 1)) / 2 <= 2) ? 1 : $clog2((NL * (NL - 1)) / 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [KW-1:0] k1_in,
  input  logic [KW-1:0] k2_in,
  input  logic          e1_in,
  input  logic          e2_in,
  input  logic          v_in,
  output logic [AW-1:0] addr,
  output logic [KW-1:0] k1_out,
  output logic          e1_out,
  output logic          e2_out,
  output logic          v_out
);

  localparam int unsigned NK = 1 << KW;

  function automatic logic [AW-1:0] tri_of(input int unsigned k);
    return AW'((k * (k - 1)) / 2);
  endfunction

  logic [AW-1:0] tri_tab [NK];
  always_comb
    for (int unsigned k = 0; k < NK; k++)
      tri_tab[k] = (k == 0 || k >= NL) ? '0 : tri_of(k);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr <= '0; k1_out <= '0; e1_out <= 1'b0; e2_out <= 1'b0; v_out <= 1'b0;
    end else begin
      addr   <= tri_tab[k2_in] + AW'(k1_in);
      k1_out <= k1_in;
      e1_out <= e1_in;
      e2_out <= e2_in;
      v_out  <= v_in;
    end
  end

endmodule
