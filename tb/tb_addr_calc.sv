// tb_addr_calc: for every pair k2 > k1 of 38 variables the address must be
// k2(k2-1)/2 + k1 one cycle after the inputs, with k1/e1/e2/v passed along.
module tb_addr_calc;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [5:0] k1, k2, k1o; logic e1, e2, v, e1o, e2o, vo; logic [9:0] addr;
  addr_calc dut (.clk, .rst_n, .k1_in(k1), .k2_in(k2), .e1_in(e1), .e2_in(e2), .v_in(v),
                 .addr, .k1_out(k1o), .e1_out(e1o), .e2_out(e2o), .v_out(vo));

  initial begin
    k1 = 0; k2 = 0; e1 = 0; e2 = 0; v = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 1; b < 38; b++)
      for (int a = 0; a < b; a++) begin
        logic [2:0] r;
        r = 3'($urandom);
        k1 = 6'(a); k2 = 6'(b); e1 = r[0]; e2 = r[1]; v = r[2];
        @(negedge clk);
        checks++;
        if (addr != 10'(b * (b - 1) / 2 + a) || k1o != 6'(a) || e1o != r[0] || e2o != r[1] || vo != r[2]) begin
          failures++; $display("FAIL k2=%0d k1=%0d addr=%0d", b, a, addr);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
