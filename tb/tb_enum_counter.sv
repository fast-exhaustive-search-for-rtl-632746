// tb_enum_counter: checks that one start pulse yields steps 0..2^NL-1 on
// consecutive cycles, exactly 2^NL live cycles, then done; and that a
// second start restarts the sequence.
module tb_enum_counter;
  localparam int unsigned NL = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NL-1:0] ctr;
  logic valid, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  enum_counter #(.NL(NL)) dut (.clk, .rst_n, .start, .ctr, .valid, .done);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int live;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      live = 0;
      for (int t = 0; t < (1 << NL); t++) begin
        chk(valid && ctr == NL'(t) && !done, $sformatf("step %0d ctr=%0d v=%0d", t, ctr, valid));
        live += valid;
        @(negedge clk);
      end
      chk(!valid && done, "done after the last step");
      chk(live == (1 << NL), "live cycle count");
      repeat (3) @(negedge clk);
      chk(!valid && done, "stays done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
