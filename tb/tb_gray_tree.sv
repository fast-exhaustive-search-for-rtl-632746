// tb_gray_tree: compares k1/k2/e1/e2 with a bit-by-bit scan, for every
// value of a 10-bit step and for random and corner values of a 38-bit
// step, one cycle after the input (latency 1).
module tb_gray_tree;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [9:0]  c10; logic [3:0] a1, a2; logic ae1, ae2, av;
  logic [37:0] c38; logic [5:0] b1, b2; logic be1, be2, bv;
  logic vin;

  gray_tree #(.NL(10)) d10 (.clk, .rst_n, .ctr(c10), .v_in(vin), .k1(a1), .k2(a2), .e1(ae1), .e2(ae2), .v_out(av));
  gray_tree          d38 (.clk, .rst_n, .ctr(c38), .v_in(vin), .k1(b1), .k2(b2), .e1(be1), .e2(be2), .v_out(bv));

  function automatic void ref_bits(input logic [63:0] v, input int n, output int p1, output int p2,
                                   output bit f1, output bit f2);
    f1 = 0; f2 = 0; p1 = 0; p2 = 0;
    for (int b = 0; b < n; b++)
      if (v[b]) begin
        if (!f1) begin f1 = 1; p1 = b; end
        else if (!f2) begin f2 = 1; p2 = b; end
      end
  endfunction

  task automatic apply(logic [9:0] x10, logic [37:0] x38);
    int p1, p2; bit f1, f2;
    c10 = x10; c38 = x38; vin = x10[0];
    @(negedge clk);
    ref_bits(64'(x10), 10, p1, p2, f1, f2);
    checks++;
    if (ae1 !== f1 || ae2 !== f2 || (f1 && a1 != 4'(p1)) || (f2 && a2 != 4'(p2)) || av !== x10[0]) begin
      failures++; $display("FAIL 10-bit %b: %0d %0d %0d %0d", x10, ae1, a1, ae2, a2);
    end
    ref_bits(64'(x38), 38, p1, p2, f1, f2);
    checks++;
    if (be1 !== f1 || be2 !== f2 || (f1 && b1 != 6'(p1)) || (f2 && b2 != 6'(p2))) begin
      failures++; $display("FAIL 38-bit %h", x38);
    end
  endtask

  initial begin
    c10 = 0; c38 = 0; vin = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      logic [37:0] r;
      r = {$urandom, $urandom};
      if (i % 4 == 1) r = 38'(1) << (i % 38);
      if (i % 4 == 2) r = (38'(1) << (i % 38)) | (38'(1) << 37);
      if (i % 8 == 3) r = 38'(1) << 36 | 38'(1) << 37;
      apply(10'(i), r);
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
