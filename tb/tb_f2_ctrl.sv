// tb_f2_ctrl: self-checking test of the second FPGA's controller on its own
// (N_MAX = 64), with simple models around it: a jptr bank with one-cycle read
// latency, a partial summation unit that is busy for 14 cycles after its last
// input, and an accumulator that returns each request 56 cycles later.
// Checked: the INIT sweep clears every row once before the controller is
// ready; each dot product is handed on with the row index jptr(j) of its
// position j in the stream (also when products arrive back to back or with
// gaps); the output sequence starts only when the summation pipeline is
// empty, reads and clears rows 0..n-1 once each in order; done pulses once,
// after the n-th accumulator result; a second iteration starts again at j = 0.
module tb_f2_ctrl;
  localparam int N = 64, RW = 6, JAW = 16, NR = 37;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic [RW:0] n_rows = 7'(NR);
  logic dp_valid = 1'b0, dp_last = 1'b0;
  logic [JAW-1:0] jptr_addr;
  logic [63:0] jptr_data;
  logic ps_start, ps_valid, ps_busy, out_mode, clr_en, acc_valid, acc_out_valid, ready, done;
  logic [RW-1:0] ps_row, out_row, clr_row;
  logic [15:0] jmem [4096];
  int checks = 0, failures = 0;

  f2_ctrl #(.N_MAX(N), .JAW(JAW)) dut (.*);

  // jptr bank model
  always_ff @(posedge clk) jptr_data <= 64'(jmem[jptr_addr[11:0]]);
  // summation pipeline model
  int busy_cnt = 0;
  always @(posedge clk) if (ps_valid) busy_cnt <= 14; else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
  assign ps_busy = busy_cnt > 0;
  // accumulator model
  logic [55:0] acc_sr = '0;
  always @(posedge clk) acc_sr <= {acc_sr[54:0], acc_valid};
  assign acc_out_valid = acc_sr[55];

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observed sequences
  int clr_seen [N];
  int out_rows [$];
  int ps_rows [$];
  int done_cnt = 0;
  always @(negedge clk) if (rst_n) begin
    if (clr_en && !out_mode) clr_seen[clr_row]++;
    if (out_mode) begin
      out_rows.push_back(int'(out_row));
      checks++;
      if (!clr_en || clr_row != out_row || !acc_valid || ps_busy) begin
        failures++; $display("output row %0d not read, cleared and summed together", out_row);
      end
    end
    if (ps_valid) ps_rows.push_back(int'(ps_row));
    if (done) done_cnt++;
  end

  initial begin
    int G;
    int exp_rows [$];
    for (int i = 0; i < N; i++) clr_seen[i] = 0;
    // jptr: non-decreasing row indices over NR rows
    G = 0;
    for (int r = 0; r < NR; r++) begin
      int len;
      len = 1 + int'($urandom % 9);
      for (int e = 0; e < len; e++) begin jmem[G] = 16'(r); G++; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++; if (ready) begin failures++; $display("ready during INIT"); end
    wait (ready);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (clr_seen[i] != 1) begin failures++; $display("row %0d cleared %0d times in INIT", i, clr_seen[i]); end
    end
    for (int it = 0; it < 2; it++) begin
      int j;
      j = 0;
      ps_rows.delete(); out_rows.delete(); done_cnt = 0;
      while (j < G) begin
        @(negedge clk);
        dp_valid = (it == 0) || (($urandom % 3) != 0);
        dp_last = dp_valid && (j == G - 1);
        if (dp_valid) j++;
      end
      @(negedge clk); dp_valid = 1'b0; dp_last = 1'b0;
      wait (done_cnt > 0);
      repeat (5) @(negedge clk);
      checks++;
      if (ps_rows.size() != G) begin failures++; $display("%0d products passed on, expected %0d", ps_rows.size(), G); end
      for (int k = 0; k < ps_rows.size() && k < G; k++) begin
        checks++;
        if (ps_rows[k] != int'(jmem[k])) begin
          failures++;
          if (failures < 10) $display("iter %0d product %0d: row %0d expected %0d", it, k, ps_rows[k], jmem[k]);
        end
      end
      checks++;
      if (out_rows.size() != NR) begin failures++; $display("%0d rows output", out_rows.size()); end
      for (int k = 0; k < out_rows.size(); k++) begin
        checks++;
        if (out_rows[k] != k) begin failures++; $display("output row %0d is %0d", k, out_rows[k]); end
      end
      checks++;
      if (done_cnt != 1 || !ready) begin failures++; $display("done pulses %0d, ready %b", done_cnt, ready); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
