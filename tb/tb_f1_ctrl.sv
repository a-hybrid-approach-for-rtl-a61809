// tb_f1_ctrl: self-checking test of the first FPGA's controller (N_MAX = 64)
// with a model of the row-pointer RAM (one-cycle read latency). Checked over
// two iterations: p words are written to addresses 0..n-1 (restarting at 0
// in the next iteration); after start the controller reads ptr[n], then
// issues k-group addresses 0..G-1 on consecutive cycles; grp_valid is high
// for exactly G consecutive cycles, each two cycles after the address of the
// same k-group, with grp_last on the final one; done pulses once, right
// after the n-th returned q, and busy covers the whole operation.
module tb_f1_ctrl;
  localparam int N = 64, RW = 6, PAW = 7, GAW = 16, NR = 40;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic [RW:0] n_rows = 7'(NR);
  logic start = 1'b0, p_in_valid = 1'b0, q_valid = 1'b0;
  logic p_we, grp_valid, grp_last, busy, done;
  logic [RW-1:0] p_waddr;
  logic [PAW-1:0] ptr_raddr;
  logic [16:0] ptr_rdata;
  logic [GAW-1:0] grp_addr;
  logic [16:0] pmem [N + 1];
  int checks = 0, failures = 0;

  f1_ctrl #(.N_MAX(N), .GAW(GAW)) dut (.*);
  always_ff @(posedge clk) ptr_rdata <= pmem[ptr_raddr];

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int addr_hist [$];
  int nvalid, nlast, ndone, k_seen;
  logic prev_valid;
  always @(negedge clk) if (rst_n) begin
    addr_hist.push_front(int'(grp_addr));
    if (grp_valid) begin
      checks++;
      if (addr_hist[2] != k_seen || (prev_valid == 1'b0 && k_seen != 0)) begin
        failures++;
        if (failures < 10) $display("k-group %0d: address two cycles earlier %0d", k_seen, addr_hist[2]);
      end
      if (grp_last) nlast++;
      k_seen++;
      nvalid++;
    end
    prev_valid = grp_valid;
    if (done) ndone++;
  end

  initial begin
    int G;
    G = 123;
    for (int i = 0; i <= N; i++) pmem[i] = '0;
    pmem[NR] = 17'(G);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2; it++) begin
      nvalid = 0; nlast = 0; ndone = 0; k_seen = 0;
      for (int i = 0; i < NR; i++) begin
        @(negedge clk);
        p_in_valid = 1'b1;
        #1;
        checks++;
        if (!p_we || int'(p_waddr) != i) begin failures++; $display("p word %0d written at %0d (we %b)", i, p_waddr, p_we); end
      end
      @(negedge clk); p_in_valid = 1'b0;
      start = 1'b1;
      @(negedge clk); start = 1'b0;
      checks++; if (!busy) begin failures++; $display("not busy after start"); end
      wait (nvalid == G);
      repeat (3) @(negedge clk);
      checks++;
      if (nlast != 1 || nvalid != G) begin failures++; $display("%0d valid, %0d last", nvalid, nlast); end
      for (int i = 0; i < NR; i++) begin
        @(negedge clk); q_valid = 1'b1;
        @(negedge clk); q_valid = 1'b0; #1;
        checks++;
        if ((ndone != 0) != (i == NR - 1)) begin failures++; $display("done after %0d q", i + 1); end
        if (($urandom % 2) == 0) @(negedge clk);
      end
      @(negedge clk);
      checks++; if (busy || ndone != 1) begin failures++; $display("busy %b done %0d", busy, ndone); end
      G = 57;
      pmem[NR] = 17'(G);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
