// enum_counter: the enumeration counter of the Gray-code part.
//
// A one-cycle start pulse begins a run: ctr then steps 0, 1, ..., 2^NL-1,
// one step per clock, with valid high for each live step, after which valid
// drops and done rises and stays high until the next start. Step t stands for
// the input gray(t) = t ^ (t >> 1) of every instance; NL = n - i is the
// number of variables each instance enumerates. Counting one step per cycle
// follows the source design; the start/done handshake and the synchronous
// active-low reset are this design's own choices. A start pulse during a run
// restarts it from step 0.
module enum_counter #(
  parameter int unsigned NL = 38
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [NL-1:0] ctr,
  output logic          valid,
  output logic          done
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctr   <= '0;
      valid <= 1'b0;
      done  <= 1'b0;
    end else if (start) begin
      ctr   <= '0;
      valid <= 1'b1;
      done  <= 1'b0;
    end else if (valid) begin
      if (ctr == {NL{1'b1}}) begin
        valid <= 1'b0;
        done  <= 1'b1;
      end else begin
        ctr <= ctr + 1'b1;
      end
    end
  end

endmodule
