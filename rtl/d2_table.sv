// d2_table: constant second-derivative table of one Gray-code equation.
//
// For a quadratic equation the second derivative with respect to x[k2] and
// x[k1] is simply the coefficient of x[k2]x[k1], so the table holds
// NL*(NL-1)/2 bits. As on the LUT-based original it is cut into 64-bit words
// (one LUT-6 each): the low 6 address bits select the bit inside a word, the
// remaining bits select the word. The read is registered (latency 1). The
// step bundle (v, e1, e2, k1, addr) is buffered in the same stage, so the
// outputs feed both the first instance group of this equation (with d2) and
// the table of the next equation, one cycle later than this one.
// The original bakes the table contents into the FPGA configuration; here
// they are written one 64-bit word at a time through cfg_we/cfg_word/
// cfg_data, which is this design's choice. Load only while no run is active.
module d2_table #(
  parameter int unsigned NL  = 38,
  localparam int unsigned KW = (NL <= 2) ? 1 : $clog2(NL),
  localparam int unsigned NT = (NL * (NL - 1)) / 2,
  localparam int unsigned AW = (NT <= 2) ? 1 : $clog2(NT),
  localparam int unsigned NWORDS = (NT + mq_pkg::LUT_W - 1) / mq_pkg::LUT_W,
  localparam int unsigned WW = (NWORDS <= 2) ? 1 : $clog2(NWORDS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // step bundle in
  input  logic [AW-1:0]            addr_in,
  input  logic [KW-1:0]            k1_in,
  input  logic                     e1_in,
  input  logic                     e2_in,
  input  logic                     v_in,
  // configuration
  input  logic                     cfg_we,
  input  logic [WW-1:0]            cfg_word,
  input  logic [mq_pkg::LUT_W-1:0] cfg_data,
  // step bundle out, with the looked-up second derivative
  output logic [AW-1:0]            addr_out,
  output logic [KW-1:0]            k1_out,
  output logic                     e1_out,
  output logic                     e2_out,
  output logic                     v_out,
  output logic                     d2
);

  logic [mq_pkg::LUT_W-1:0] lut [NWORDS];

  // Word and bit-offset split of the address.
  logic [31:0] word_idx;
  logic [5:0]  bit_idx;
  assign word_idx = 32'(addr_in) / mq_pkg::LUT_W;
  assign bit_idx  = 6'(32'(addr_in) % mq_pkg::LUT_W);

  always_ff @(posedge clk) begin
    if (cfg_we && 32'(cfg_word) < NWORDS) lut[cfg_word] <= cfg_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr_out <= '0; k1_out <= '0; e1_out <= 1'b0; e2_out <= 1'b0; v_out <= 1'b0;
      d2 <= 1'b0;
    end else begin
      addr_out <= addr_in;
      k1_out   <= k1_in;
      e1_out   <= e1_in;
      e2_out   <= e2_in;
      v_out    <= v_in;
      d2       <= (word_idx < NWORDS) ? lut[word_idx[WW-1:0]][bit_idx] : 1'b0;
    end
  end

endmodule
