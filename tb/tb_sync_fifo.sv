// tb_sync_fifo: random pushes and pops against a queue model, with phases
// that fill the FIFO to full and drain it to empty; checks the head word,
// empty, full and the lost pulse of a refused push every cycle.
module tb_sync_fifo;
  localparam int W = 12, DEP = 5;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic push, pop, empty, full, lost; logic [W-1:0] din, dout;
  sync_fifo #(.WIDTH(W), .DEPTH(DEP)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .lost);

  logic [W-1:0] q[$];
  int n_full = 0, n_lost = 0;

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int ph;
      bit e_lost;
      ph = (c / 100) % 3;
      push = ($urandom % 4) < (ph == 0 ? 3 : ph == 1 ? 1 : 2);
      pop  = ($urandom % 4) < (ph == 0 ? 1 : ph == 1 ? 3 : 2);
      din  = W'($urandom);
      #1;
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEP) || (q.size() > 0 && dout != q[0])) begin
        failures++; $display("FAIL cycle %0d size %0d empty %0d full %0d", c, q.size(), empty, full);
      end
      e_lost = push && q.size() == DEP && !pop;
      checks++;
      if (lost != e_lost) begin failures++; $display("FAIL lost at %0d", c); end
      if (full) n_full++;
      if (lost) n_lost++;
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && !e_lost) q.push_back(din);
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_lost == 0) begin failures++; $display("FAIL full never reached"); end
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
