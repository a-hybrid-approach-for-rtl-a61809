// fp_delay: a fixed-latency delay line of W-bit words (the "delay unit" that
// keeps the branches of an adder tree in step). Every clock cycle the word on
// din enters and the word that entered LAT cycles earlier appears on dout.
// LAT = 0 makes it a wire. The stages are not reset: whatever travels with
// the data (a valid bit, for instance) is expected to be reset by the user.
module fp_delay #(
  parameter int unsigned W   = 64,
  parameter int unsigned LAT = 14
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (LAT == 0) begin : g_wire
    assign dout = din;
  end else begin : g_pipe
    logic [W-1:0] sr [LAT];
    always_ff @(posedge clk) begin
      sr[0] <= din;
      for (int i = 1; i < LAT; i++) sr[i] <= sr[i-1];
    end
    assign dout = sr[LAT-1];
  end
endmodule
