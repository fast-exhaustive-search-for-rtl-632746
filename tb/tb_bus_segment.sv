// tb_bus_segment: random group results and random bus traffic against a
// queue model written from the bus rules: an empty bus word lets the oldest
// waiting result out (or a fresh one with count 0), waiting results age by
// one per cycle up to 15, a fifth waiting result is dropped with a warning,
// and occupied bus words pass unchanged. Every output word is compared, and
// each rule must have been exercised.
module tb_bus_segment;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [3:0] sol, bsi, bso; logic [7:0] bidi, bido; logic [3:0] bci, bco; logic bwi, bwo;
  logic pb, ovf;

  bus_segment #(.GID_W(8), .MY_ID(8'h5A)) dut (.clk, .rst_n, .sol,
    .bus_sol_in(bsi), .bus_id_in(bidi), .bus_cnt_in(bci), .bus_warn_in(bwi),
    .bus_sol_out(bso), .bus_id_out(bido), .bus_cnt_out(bco), .bus_warn_out(bwo),
    .pushed_back(pb), .overflow(ovf));

  typedef struct { logic [3:0] s; int c; } ent_t;
  ent_t q[$];
  int n_own = 0, n_pass = 0, n_ovf = 0, n_sat = 0, n_bypass = 0;

  initial begin
    sol = '1; bsi = '1; bidi = 0; bci = 0; bwi = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      logic [3:0] e_s; logic [7:0] e_id; logic [3:0] e_c; logic e_w;
      bit busy, newc, ov;
      int phase;
      phase = (cyc / 500) % 4;   // vary the load
      newc = ($urandom % 8) < (phase == 0 ? 1 : phase == 1 ? 3 : phase == 2 ? 6 : 2);
      busy = ($urandom % 8) < (phase == 0 ? 1 : phase == 1 ? 5 : phase == 2 ? 7 : 8);
      sol  = newc ? (4'($urandom) & ~(4'(1) << ($urandom % 4))) : 4'hF;
      bsi  = busy ? (4'($urandom) & ~(4'(1) << ($urandom % 4))) : 4'hF;
      bidi = 8'($urandom); bci = 4'($urandom); bwi = ($urandom % 16 == 0);
      // model
      ov = 0;
      if (!busy && (q.size() > 0 || newc)) begin
        if (q.size() > 0) begin
          e_s = q[0].s; e_c = 4'(q[0].c); void'(q.pop_front());
        end else begin
          e_s = sol; e_c = 0; newc = 0; n_bypass++;
        end
        e_id = 8'h5A; n_own++;
      end else begin
        e_s = bsi; e_id = bidi; e_c = bci; n_pass++;
      end
      foreach (q[i]) if (q[i].c < 15) q[i].c++; else n_sat++;
      if (newc) begin
        if (q.size() < 4) q.push_back('{s: sol, c: 1});
        else begin ov = 1; n_ovf++; end
      end
      e_w = bwi | ov;
      @(negedge clk);
      checks++;
      if (bso !== e_s || (e_s != 4'hF && (bido !== e_id || bco !== e_c)) || bwo !== e_w) begin
        failures++;
        $display("FAIL cyc %0d: got %b/%h/%0d/%b want %b/%h/%0d/%b", cyc, bso, bido, bco, bwo, e_s, e_id, e_c, e_w);
      end
    end
    checks++;
    if (n_own == 0 || n_pass == 0 || n_ovf == 0 || n_sat == 0 || n_bypass == 0) begin
      failures++; $display("FAIL rule not exercised: own %0d pass %0d ovf %0d sat %0d bypass %0d",
                           n_own, n_pass, n_ovf, n_sat, n_bypass);
    end
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
