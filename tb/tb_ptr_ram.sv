// tb_ptr_ram: self-checking test of the row-pointer RAM (N_MAX = 2,048, so
// 2,049 entries of 17 bits). A non-decreasing pointer vector ending in the
// largest value 2^16 is written, then random entries, and entry N_MAX, are
// read back; data must appear one cycle after the address.
module tb_ptr_ram;
  localparam int N = 2048, AW = 12;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [16:0]   wdata = '0, rdata;
  logic [16:0]   model [N + 1];
  int checks = 0, failures = 0;

  ptr_ram #(.N_MAX(N)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc = 0;
    logic [AW-1:0] prev;
    for (int i = 0; i <= N; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i);
      wdata = (i == N) ? 17'h10000 : 17'(acc);
      model[i] = wdata;
      acc += int'($urandom % 32);
    end
    @(negedge clk); we = 1'b0;
    raddr = AW'(N); prev = raddr;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (rdata !== model[prev]) begin
        failures++;
        if (failures < 10) $display("ptr[%0d] = %h expected %h", prev, rdata, model[prev]);
      end
      raddr = (c % 7 == 0) ? AW'(N) : AW'($urandom % (N + 1)); prev = raddr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
