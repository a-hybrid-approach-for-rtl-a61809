// stream_channel: one-directional streaming channel between the two FPGAs.
//
// A word of W bits with a valid bit enters every cycle and leaves LAT cycles
// later, through a register at the sending end, LAT-2 register stages for the
// board traces and a register at the receiving end. The channel never stalls:
// the receiving side of this design always takes one word per cycle. The
// latency is this design's choice (4 cycles by default); nothing downstream
// depends on its value. Only the valid bits are reset.
module stream_channel #(
  parameter int unsigned W   = 65,
  parameter int unsigned LAT = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  initial assert (LAT >= 1) else $error("stream_channel: LAT must be at least 1");

  logic         v_q [LAT];
  logic [W-1:0] d_q [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < LAT; i++) v_q[i] <= 1'b0;
    else begin
      v_q[0] <= in_valid;
      for (int i = 1; i < LAT; i++) v_q[i] <= v_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    d_q[0] <= in_data;
    for (int i = 1; i < LAT; i++) d_q[i] <= d_q[i-1];
  end

  assign out_valid = v_q[LAT-1];
  assign out_data  = d_q[LAT-1];
endmodule
