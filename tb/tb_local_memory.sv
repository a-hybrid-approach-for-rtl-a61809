// tb_local_memory: self-checking test of the local memory banks at their
// default size (6 banks of 2^16 words). Random words are written through the
// single host write port to random banks and addresses, including the first
// and last address; every bank is then read at its own address each cycle
// and must return the stored word one cycle later. Words never written are
// not checked.
module tb_local_memory;
  localparam int NB = 6, D = 65536, AW = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic          we = 1'b0;
  logic [2:0]    wbank = '0;
  logic [AW-1:0] waddr = '0;
  logic [63:0]   wdata = '0;
  logic [AW-1:0] raddr [NB];
  logic [63:0]   rdata [NB];
  logic [63:0]   model [NB][int];
  int checks = 0, failures = 0;

  local_memory dut (.clk, .we, .wbank, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int addrs [$];
    logic [AW-1:0] prev [NB];
    for (int b = 0; b < NB; b++) raddr[b] = '0;
    addrs.push_back(0); addrs.push_back(D - 1);
    for (int i = 0; i < 40; i++) addrs.push_back(int'($urandom % D));
    foreach (addrs[i]) for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      we = 1'b1; wbank = 3'(b); waddr = AW'(addrs[i]);
      wdata = {32'($urandom), 32'($urandom)};
      model[b][addrs[i]] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int b = 0; b < NB; b++) begin raddr[b] = AW'(addrs[(b * 7) % addrs.size()]); prev[b] = raddr[b]; end
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (rdata[b] !== model[b][int'(prev[b])]) begin
          failures++;
          if (failures < 10) $display("bank %0d addr %0d: %h expected %h", b, prev[b], rdata[b], model[b][int'(prev[b])]);
        end
        raddr[b] = AW'(addrs[$urandom % addrs.size()]); prev[b] = raddr[b];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
