// tb_cg_trials: runs the sparse matrix-vector multiply module, at its
// default parameters, on matrices of the nine sizes used to evaluate the
// design: orders n = 1000, 1500, 2000 with about 12,500, 54,000 and 253,000
// non-zeros (three trials). The exact non-zero counts are taken over; the
// matrices themselves are generated here (random column positions, small
// integer values, so that every result is exact and can be compared bit for
// bit). For each matrix the test loads the k-aligned arrays into the local
// memory and the row pointers (startup), then runs two iterations with
// different p vectors and checks every q_i against q = A p computed here. It
// also checks that each iteration takes one cycle per k-group plus one per
// row plus a fixed pipeline overhead, i.e. that the dot-product stream never
// stalls even for the largest matrices.
module tb_cg_trials;
  import cg_pkg::*;
  localparam int K = 4;
  localparam int NTRIAL = 9;
  localparam int TN  [NTRIAL] = '{1000, 1500, 2000, 1000, 1500, 2000, 1000, 1500, 2000};
  localparam int TNZ [NTRIAL] = '{12528, 12418, 13834, 54694, 51832, 55386, 253274, 251462, 254066};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic [11:0] n_rows = '0;
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
  int fwd_cnt = 0;
  always @(posedge clk) if (psum_fwd) fwd_cnt++;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  rlen [];
  int  rstart [];
  int  cols [];
  real vals [];
  real p [];
  real qref [];

  // one write per cycle; the caller ends the burst with wr_end
  task automatic wr_mem(input int bank, input int addr, input logic [63:0] d);
    @(negedge clk);
    ptr_we = 1'b0;
    mem_we = 1'b1; mem_wbank = 3'(bank); mem_waddr = 16'(addr); mem_wdata = d;
  endtask
  task automatic wr_ptr(input int addr, input int d);
    @(negedge clk);
    mem_we = 1'b0;
    ptr_we = 1'b1; ptr_waddr = 12'(addr); ptr_wdata = 17'(d);
  endtask
  task automatic wr_end();
    @(negedge clk);
    mem_we = 1'b0; ptr_we = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NTRIAL; t++) begin
      int n, nz, g, e, base, pad;
      n = TN[t]; nz = TNZ[t];
      rlen = new[n]; rstart = new[n]; cols = new[nz]; vals = new[nz]; p = new[n]; qref = new[n];
      // row lengths: nz spread over the rows, then pairwise perturbed
      base = nz / n;
      for (int i = 0; i < n; i++) rlen[i] = base + ((i < nz % n) ? 1 : 0);
      for (int i = 0; i + 1 < n; i += 2) begin
        int d;
        d = int'($urandom % (base / 2 + 1));
        rlen[i] += d; rlen[i+1] -= d;
      end
      e = 0;
      for (int i = 0; i < n; i++) begin
        rstart[i] = e;
        for (int k = 0; k < rlen[i]; k++) begin
          cols[e] = int'($urandom % n);
          vals[e] = real'(1 + int'($urandom % 9)) * ((($urandom % 2) == 0) ? 1.0 : -1.0);
          e++;
        end
      end
      // startup sequence
      n_rows = 12'(n);
      g = 0; pad = 0;
      for (int i = 0; i < n; i++) begin
        wr_ptr(i, g);
        for (int e0 = 0; e0 < rlen[i]; e0 += K) begin
          logic [63:0] cw;
          cw = '0;
          for (int h = 0; h < K; h++) begin
            if (e0 + h < rlen[i]) begin
              wr_mem(h, g, $realtobits(vals[rstart[i] + e0 + h]));
              cw[16*h +: 16] = 16'(cols[rstart[i] + e0 + h]);
            end else begin
              wr_mem(h, g, 64'd0);
              pad++;
            end
          end
          wr_mem(K, g, cw);
          wr_mem(K + 1, g, 64'(i));
          g++;
        end
      end
      wr_ptr(n, g);
      wr_end();
      wait (ready);
      for (int it = 0; it < 2; it++) begin
        int nq, t0, bad;
        for (int j = 0; j < n; j++) begin
          p[j] = real'(int'($urandom % 201) - 100) / ((it == 1) ? 8.0 : 1.0);
          @(negedge clk); p_valid = 1'b1; p_data = $realtobits(p[j]);
        end
        @(negedge clk); p_valid = 1'b0;
        for (int i = 0; i < n; i++) begin
          qref[i] = 0.0;
          for (int k = 0; k < rlen[i]; k++) qref[i] += vals[rstart[i] + k] * p[cols[rstart[i] + k]];
        end
        @(negedge clk); start = 1'b1; t0 = cyc;
        @(negedge clk); start = 1'b0;
        nq = 0; bad = 0;
        while (!done) begin
          @(negedge clk);
          if (q_valid) begin
            if (nq >= n || q_data !== $realtobits(qref[nq])) begin
              bad++;
              if (bad < 4) $display("n=%0d nz=%0d q[%0d] = %f expected %f", n, nz, nq,
                                    $bitstoreal(q_data), qref[nq]);
            end
            nq++;
          end
        end
        checks++;
        if (bad != 0 || nq != n) begin failures++; $display("trial n=%0d nz=%0d: %0d wrong q, %0d received", n, nz, bad, nq); end
        checks++;
        if (cyc - t0 < g + n || cyc - t0 > g + n + 140) begin
          failures++; $display("iteration took %0d cycles for %0d k-groups and %0d rows", cyc - t0, g, n);
        end
        if (it == 0)
          $display("n=%0d nz=%0d: %0d k-groups (%0d padded slots), %0d cycles per multiply", n, nz, g, pad, cyc - t0);
        repeat (3) @(negedge clk);
      end
    end
    checks++;
    if (fwd_cnt == 0) begin failures++; $display("partial-sum forwarding never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
