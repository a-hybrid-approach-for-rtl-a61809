// tb_fpga2: self-checking test of the second FPGA (reference adder timing,
// ALPHA_V = 14, ALPHA_A = 14; N_MAX = 64 for a short run). A model of the
// jptr bank (one-cycle read latency) holds the row of every k-group. Dot
// products of small integers arrive back to back in the first iteration and
// with random gaps in the second; some rows receive more than ALPHA_V
// products and some none. Each q_i must equal the sum of the products of row
// i, the q_i must leave in row order one per cycle with the right q_row, and
// done must pulse once per iteration. The second iteration also shows that
// the output sequence left S cleared.
module tb_fpga2;
  localparam int N = 64, RW = 6, JAW = 16, NR = 50;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic [RW:0] n_rows = 7'(NR);
  logic dp_valid = 1'b0, dp_last = 1'b0;
  logic [63:0] dp_data = '0;
  logic [JAW-1:0] jptr_addr;
  logic [63:0] jptr_data;
  logic q_valid, ready, done, fwd;
  logic [63:0] q_data;
  logic [RW-1:0] q_row;
  logic [15:0] jmem [4096];
  int checks = 0, failures = 0;

  fpga2 #(.N_MAX(N)) dut (.*);

  always_ff @(posedge clk) jptr_data <= 64'(jmem[jptr_addr[11:0]]);

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real qref [NR];
  int  nq, first_q, last_q, ndone, nfwd;
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n) begin
    if (fwd) nfwd++;
    if (done) ndone++;
    if (q_valid) begin
      checks++;
      if (nq == 0) first_q = cyc;
      last_q = cyc;
      if (nq >= NR || q_data !== $realtobits(qref[nq]) || int'(q_row) != nq) begin
        failures++;
        if (failures < 10) $display("q[%0d] (row %0d) = %f expected %f", nq, q_row,
                                    $bitstoreal(q_data), qref[nq]);
      end
      nq++;
    end
  end

  initial begin
    int G;
    nfwd = 0;
    G = 0;
    for (int r = 0; r < NR; r++) begin
      int len;
      len = (r % 10 == 3) ? 0 : (r % 10 == 7) ? 20 + int'($urandom % 20) : 1 + int'($urandom % 6);
      for (int e = 0; e < len; e++) begin jmem[G] = 16'(r); G++; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (ready);
    for (int it = 0; it < 2; it++) begin
      int j;
      for (int r = 0; r < NR; r++) qref[r] = 0.0;
      nq = 0; ndone = 0;
      j = 0;
      while (j < G) begin
        @(negedge clk);
        dp_valid = (it == 0) || (($urandom % 3) != 0);
        if (dp_valid) begin
          real d;
          d = real'(int'($urandom % 2001) - 1000);
          dp_data = $realtobits(d);
          qref[jmem[j]] += d;
          dp_last = (j == G - 1);
          j++;
        end else dp_last = 1'b0;
      end
      @(negedge clk); dp_valid = 1'b0; dp_last = 1'b0;
      wait (ndone > 0);
      repeat (3) @(negedge clk);
      checks++;
      if (nq != NR || last_q - first_q != NR - 1 || ndone != 1) begin
        failures++; $display("iter %0d: %0d q over %0d cycles, %0d done pulses", it, nq, last_q - first_q + 1, ndone);
      end
    end
    checks++;
    if (nfwd == 0) begin failures++; $display("forwarding never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
