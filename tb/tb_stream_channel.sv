// tb_stream_channel: self-checking test of the inter-FPGA channel (65-bit
// words, 4-cycle latency). A random stream with random gaps is sent; every
// word must come out unchanged, in order, exactly LAT cycles after it was
// sent, and no word may appear that was not sent.
module tb_stream_channel;
  localparam int W = 65, LAT = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic [W-1:0] in_data = '0, out_data;
  typedef struct { logic [W-1:0] d; int t; } ent_t;
  ent_t q [$];
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  stream_channel #(.W(W), .LAT(LAT)) dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    ent_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("spurious word"); end
    else begin
      e = q.pop_front();
      if (out_data !== e.d || cyc - e.t != LAT) begin
        failures++;
        if (failures < 10) $display("got %h after %0d, expected %h after %0d", out_data, cyc - e.t, e.d, LAT);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      in_data = {1'($urandom), 32'($urandom), 32'($urandom)};
      if (in_valid) q.push_back('{d: in_data, t: cyc});
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d words lost", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
