// tb_cand_gray: after a start pulse, a bus word arriving DELAY + t cycles
// later with push-back count n must be turned into a record whose x_cand is
// the Gray code of step t - n, whose x_now is the Gray code of t, with the
// lanes inverted, the id kept, sat set only for count 15 with a candidate,
// and valid set for a candidate or a warning; one cycle of latency.
module tb_cand_gray;
  localparam int NL = 8, D = 7;
  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [3:0] bsol, bcnt, lanes; logic [5:0] bid, gid; logic bwarn;
  logic rv, sat, warn; logic [NL-1:0] xc, xn;
  cand_gray #(.NL(NL), .GID_W(6), .DELAY(D)) dut (.clk, .rst_n, .start,
    .bus_sol(bsol), .bus_id(bid), .bus_cnt(bcnt), .bus_warn(bwarn),
    .rec_valid(rv), .rec_lanes(lanes), .rec_gid(gid), .rec_sat(sat), .rec_warn(warn),
    .rec_x_cand(xc), .rec_x_now(xn));

  function automatic logic [NL-1:0] g(int s);
    logic [NL-1:0] u; u = NL'(s);
    return u ^ (u >> 1);
  endfunction

  initial begin
    bsol = '1; bcnt = 0; bid = 0; bwarn = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    // first cycle after start is cycle 1; step t leaves the bus in cycle 1 + D + t
    repeat (D) @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      logic [3:0] s, c; logic w; logic [5:0] id;
      s = ($urandom % 2) ? 4'($urandom) : 4'hF; c = 4'($urandom); w = ($urandom % 8 == 0);
      id = 6'($urandom);
      bsol = s; bcnt = c; bwarn = w; bid = id;
      @(negedge clk);
      checks++;
      if (rv != (s != 4'hF || w) || warn != w ||
          (s != 4'hF && (lanes != ~s || gid != id || xc != g(t - int'(c)) || sat != (c == 4'hF))) ||
          xn != g(t)) begin
        failures++; $display("FAIL t=%0d cnt=%0d xc=%h want %h xn=%h", t, c, xc, g(t - int'(c)), xn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
