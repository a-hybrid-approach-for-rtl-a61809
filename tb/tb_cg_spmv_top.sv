// tb_cg_spmv_top: end-to-end test of the sparse matrix-vector multiply module
// with every parameter at its default (K = 4, ALPHA_V = 14, ALPHA_M = 10,
// ALPHA_A = 14, N_MAX = 2,048, 2^16 k-groups of local memory).
//
// A random sparse matrix of NR rows is generated with small integer entries,
// so that every floating-point sum is exact in any order and the results can
// be compared bit for bit. Row lengths are random; a few rows are longer than
// K * ALPHA_V non-zeros so that the partial summation unit reuses a column of
// S within one row and forwards a sum that is being written. The host side of
// the test k-aligns the rows (zero padding), fills the local memory banks and
// the row-pointer RAM once (startup sequence), then runs ITERS iterations,
// each streaming a new p (input sequence), pulsing start (execute sequence)
// and collecting q (output sequence), which is compared with q = A p
// computed here. It also checks that the dot products leave the first FPGA
// one per cycle without a gap, and counts the mechanisms exercised:
// k-alignment padding, forwarding in the partial summation, rows summed
// from a reused (cleared) S, and iterations that reuse the stored matrix.
module tb_cg_spmv_top;
  import cg_pkg::*;
  localparam int NR    = 48;     // matrix order of this test
  localparam int ITERS = 3;
  localparam int K     = 4;
  localparam int AV    = 14;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic [11:0] n_rows = 12'(NR);
  logic        mem_we = 1'b0;
  logic [2:0]  mem_wbank = '0;
  logic [15:0] mem_waddr = '0;
  logic [63:0] mem_wdata = '0;
  logic        ptr_we = 1'b0;
  logic [11:0] ptr_waddr = '0;
  logic [16:0] ptr_wdata = '0;
  logic        p_valid = 1'b0;
  logic [63:0] p_data = '0;
  logic        start = 1'b0;
  logic        q_valid, ready, busy, done, psum_fwd;
  logic [63:0] q_data;

  cg_spmv_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // matrix in row-major triplets
  int   rlen [NR];
  int   cols [NR][$];
  real  vals [NR][$];
  real  p [NR];
  real  qref [NR];
  int   ngroups, npad;

  // mechanism counters
  int fwd_cnt = 0, dp_cnt = 0, dp_gap = 0, dp_run = 0;
  logic in_run = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (psum_fwd) fwd_cnt++;
    if (dut.dp_valid) begin
      dp_cnt++;
      if (!in_run && dp_run != 0) dp_gap++;
      in_run = 1'b1;
      dp_run++;
      if (dut.dp_last) begin in_run = 1'b0; dp_run = 0; end
    end else if (in_run) begin
      dp_gap++;
    end
  end

  task automatic wr_mem(input int bank, input int addr, input logic [63:0] d);
    @(negedge clk);
    mem_we = 1'b1; mem_wbank = 3'(bank); mem_waddr = 16'(addr); mem_wdata = d;
    @(negedge clk);
    mem_we = 1'b0;
  endtask

  task automatic wr_ptr(input int addr, input int d);
    @(negedge clk);
    ptr_we = 1'b1; ptr_waddr = 12'(addr); ptr_wdata = 17'(d);
    @(negedge clk);
    ptr_we = 1'b0;
  endtask

  initial begin
    int g, t0, t1;
    // ---- generate the matrix ----
    for (int i = 0; i < NR; i++) begin
      if (i % 16 == 5) rlen[i] = 57 + int'($urandom % 30);   // > K*ALPHA_V non-zeros
      else             rlen[i] = 1 + int'($urandom % 23);
      for (int e = 0; e < rlen[i]; e++) begin
        cols[i].push_back(int'($urandom % NR));
        vals[i].push_back(real'(int'($urandom % 17) - 8));
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- startup sequence: k-aligned CSR into local memory and ptr RAM ----
    g = 0; npad = 0;
    for (int i = 0; i < NR; i++) begin
      wr_ptr(i, g);
      for (int e0 = 0; e0 < rlen[i]; e0 += K) begin
        logic [63:0] cw;
        cw = '0;
        for (int h = 0; h < K; h++) begin
          if (e0 + h < rlen[i]) begin
            wr_mem(h, g, $realtobits(vals[i][e0+h]));
            cw[16*h +: 16] = 16'(cols[i][e0+h]);
          end else begin
            wr_mem(h, g, 64'd0);                 // k-alignment padding
            npad++;
          end
        end
        wr_mem(K, g, cw);
        wr_mem(K + 1, g, 64'(i));
        g++;
      end
    end
    wr_ptr(NR, g);
    ngroups = g;
    $display("matrix: n=%0d k-groups=%0d padded slots=%0d", NR, ngroups, npad);

    wait (ready);

    for (int it = 0; it < ITERS; it++) begin
      int nq;
      // ---- input sequence ----
      for (int j = 0; j < NR; j++) begin
        p[j] = real'(int'($urandom % 41) - 20) / ((it == 1) ? 4.0 : 1.0);
        @(negedge clk);
        p_valid = 1'b1; p_data = $realtobits(p[j]);
      end
      @(negedge clk); p_valid = 1'b0;
      for (int i = 0; i < NR; i++) begin
        qref[i] = 0.0;
        for (int e = 0; e < rlen[i]; e++) qref[i] += vals[i][e] * p[cols[i][e]];
      end
      // ---- execute and output sequences ----
      @(negedge clk); start = 1'b1; t0 = cyc;
      @(negedge clk); start = 1'b0;
      nq = 0;
      while (!done) begin
        @(negedge clk);
        if (q_valid) begin
          checks++;
          if (nq >= NR || q_data !== $realtobits(qref[nq])) begin
            failures++;
            if (failures < 10) $display("iter %0d q[%0d] = %h (%f), expected %f",
                                        it, nq, q_data, $bitstoreal(q_data), qref[nq]);
          end
          nq++;
        end
      end
      t1 = cyc;
      checks++;
      if (nq != NR) begin failures++; $display("iter %0d: %0d q values, expected %0d", it, nq, NR); end
      $display("iter %0d: %0d cycles from start to done (k-groups %0d, rows %0d)", it, t1 - t0, ngroups, NR);
      // the execute sequence streams one k-group per cycle, the output
      // sequence one row per cycle; the rest is fixed pipeline latency
      checks++;
      if (t1 - t0 > ngroups + NR + 2 + 38 + 4 + 15 + 56 + 4 + 8 || t1 - t0 < ngroups + NR) begin
        failures++; $display("iteration took %0d cycles", t1 - t0);
      end
      repeat (5) @(negedge clk);
    end

    // ---- mechanism coverage ----
    checks++; if (dp_cnt != ITERS * ngroups) begin failures++; $display("dot products %0d", dp_cnt); end
    checks++; if (dp_gap != 0) begin failures++; $display("dot product stream had %0d gaps", dp_gap); end
    checks++; if (npad == 0) begin failures++; $display("no k-alignment padding exercised"); end
    checks++; if (fwd_cnt == 0) begin failures++; $display("partial-sum forwarding never used"); end
    $display("mechanisms: padding=%0d forwarding=%0d iterations-on-stored-matrix=%0d dot-products=%0d",
             npad, fwd_cnt, ITERS, dp_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
