// tb_p_copies: self-checking test of the K copies of p (K = 4, 64 words for
// a short run). A vector is written once through the broadcast write port;
// then each copy is read at its own random address every cycle and must
// return the stored word one cycle later. A second vector overwrites the
// first, as in the next iteration's input sequence.
module tb_p_copies;
  localparam int K = 4, N = 64, AW = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic [63:0]   wdata = '0;
  logic [AW-1:0] raddr [K];
  logic [63:0]   rdata [K];
  logic [63:0]   model [N];
  int checks = 0, failures = 0;

  p_copies #(.K(K), .N_MAX(N), .AW(AW)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] prev [K];
    for (int h = 0; h < K; h++) raddr[h] = '0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        we = 1'b1; waddr = AW'(i); wdata = {32'($urandom), 32'($urandom)};
        model[i] = wdata;
      end
      @(negedge clk); we = 1'b0;
      for (int h = 0; h < K; h++) begin raddr[h] = AW'($urandom); prev[h] = raddr[h]; end
      for (int c = 0; c < 300; c++) begin
        @(negedge clk);
        for (int h = 0; h < K; h++) begin
          checks++;
          if (rdata[h] !== model[prev[h]]) begin
            failures++;
            if (failures < 10) $display("copy %0d addr %0d: %h expected %h", h, prev[h], rdata[h], model[prev[h]]);
          end
          raddr[h] = AW'($urandom); prev[h] = raddr[h];
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
