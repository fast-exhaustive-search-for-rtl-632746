// tb_d2_table: loads a random 703-bit table (11 words of 64 bits, for 38
// variables), then reads every address and checks the bit and the
// forwarded step bundle one cycle later.
module tb_d2_table;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int NT = 703;
  logic [9:0] addr, addr_o; logic [5:0] k1, k1_o; logic e1, e2, v, e1_o, e2_o, v_o, d2;
  logic cfg_we; logic [3:0] cfg_word; logic [63:0] cfg_data;
  logic [11*64-1:0] img;

  d2_table dut (.clk, .rst_n, .addr_in(addr), .k1_in(k1), .e1_in(e1), .e2_in(e2), .v_in(v),
                .cfg_we, .cfg_word, .cfg_data,
                .addr_out(addr_o), .k1_out(k1_o), .e1_out(e1_o), .e2_out(e2_o), .v_out(v_o), .d2);

  initial begin
    addr = 0; k1 = 0; e1 = 0; e2 = 0; v = 0; cfg_we = 0; cfg_word = 0; cfg_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 11; w++) begin
      img[w*64 +: 64] = {$urandom, $urandom};
      cfg_we = 1; cfg_word = 4'(w); cfg_data = img[w*64 +: 64];
      @(negedge clk);
    end
    cfg_we = 0;
    for (int i = 0; i < 2 * NT; i++) begin
      int a;
      a = (i < NT) ? i : int'($urandom % NT);
      addr = 10'(a); k1 = 6'($urandom % 38); e1 = 1'($urandom); e2 = 1'($urandom); v = 1'($urandom);
      @(negedge clk);
      checks++;
      if (d2 !== img[a] || addr_o != 10'(a) || k1_o != k1 || e1_o != e1 || e2_o != e2 || v_o != v) begin
        failures++; $display("FAIL addr %0d d2=%0d want %0d", a, d2, img[a]);
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
