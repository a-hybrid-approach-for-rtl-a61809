// tb_cg_solve: solves A x = b with the conjugate-gradient iteration, using
// the sparse matrix-vector multiply module (default parameters) for every
// product q = A p, the way a host program would use it.
//
// Test set-up as in the original evaluation: A = L L^T for a non-singular
// lower-triangular L (so A is symmetric positive definite), b = A x_h with
// x_h all 100s, starting point x_0 = 0, stop when ||r|| / ||b - A x_0|| <=
// 1e-9. Here L has its diagonal and the three sub-diagonals filled, giving
// A seven non-zeros per row; n = 1000, the smallest evaluated order. The matrix is loaded into the module once; each CG
// iteration streams p in, starts the module and reads q back. Checked: each
// q_i agrees with a software product to within 1e-12 of the sum of the
// magnitudes of its terms (the hardware sums in a different order, so it is
// not bit-exact here), the solver converges,
// and the solution equals x_h to a relative 1e-6.
module tb_cg_solve;
  import cg_pkg::*;
  localparam int K = 4;
  localparam int N = 1000;
  localparam int BW = 3;              // sub-diagonals of L (A has 2*BW+1 diagonals)
  localparam int MAXIT = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic [11:0] n_rows = 12'(N);
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

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real L [N][BW+1];                   // L[i][d] = L(i, i-d)
  int  rlen [N];
  int  acol [N][2*BW+1];
  real aval [N][2*BW+1];
  real x [N], r [N], p [N], q [N], b [N];

  function automatic real lval(input int i, input int j);
    if (j > i || i - j > BW || j < 0) return 0.0;
    return L[i][i-j];
  endfunction

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

  // q = A p on the hardware module
  task automatic hw_matvec(output int bad);
    int nq;
    for (int j = 0; j < N; j++) begin
      @(negedge clk); p_valid = 1'b1; p_data = $realtobits(p[j]);
    end
    @(negedge clk); p_valid = 1'b0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    nq = 0; bad = 0;
    while (!done) begin
      @(negedge clk);
      if (q_valid) begin
        real ref_q, err, mag, t;
        q[nq] = $bitstoreal(q_data);
        ref_q = 0.0; mag = 0.0;
        for (int e = 0; e < rlen[nq]; e++) begin
          t = aval[nq][e] * p[acol[nq][e]];
          ref_q += t;
          mag += (t < 0.0) ? -t : t;
        end
        err = q[nq] - ref_q;
        if (err < 0.0) err = -err;
        if (err > 1e-12 * mag) bad++;
        nq++;
      end
    end
    if (nq != N) bad += N;
  endtask

  function automatic real dot(input real u [N], input real v [N]);
    real s = 0.0;
    for (int i = 0; i < N; i++) s += u[i] * v[i];
    return s;
  endfunction

  initial begin
    int g, nz, it, bad, badsum;
    real dn, dc, alpha, r0, maxerr;
    // ---- build L and A = L L^T ----
    for (int i = 0; i < N; i++) begin
      L[i][0] = 2.0 + real'($urandom % 1000) / 1000.0;
      for (int d = 1; d <= BW; d++) L[i][d] = (i - d >= 0) ? (real'($urandom % 1000) / 1000.0 - 0.5) : 0.0;
    end
    nz = 0;
    for (int i = 0; i < N; i++) begin
      rlen[i] = 0;
      for (int j = i - BW; j <= i + BW; j++) begin
        if (j >= 0 && j < N) begin
          real s;
          s = 0.0;
          for (int k = 0; k < N && k <= i && k <= j; k++) s += lval(i, k) * lval(j, k);
          acol[i][rlen[i]] = j; aval[i][rlen[i]] = s; rlen[i]++;
        end
      end
      nz += rlen[i];
    end
    for (int i = 0; i < N; i++) begin
      b[i] = 0.0;
      for (int e = 0; e < rlen[i]; e++) b[i] += aval[i][e] * 100.0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // ---- startup: load the k-aligned matrix once ----
    g = 0;
    for (int i = 0; i < N; i++) begin
      wr_ptr(i, g);
      for (int e0 = 0; e0 < rlen[i]; e0 += K) begin
        logic [63:0] cw;
        cw = '0;
        for (int h = 0; h < K; h++) begin
          if (e0 + h < rlen[i]) begin
            wr_mem(h, g, $realtobits(aval[i][e0+h]));
            cw[16*h +: 16] = 16'(acol[i][e0+h]);
          end else wr_mem(h, g, 64'd0);
        end
        wr_mem(K, g, cw);
        wr_mem(K + 1, g, 64'(i));
        g++;
      end
    end
    wr_ptr(N, g);
    @(negedge clk); mem_we = 1'b0; ptr_we = 1'b0;
    $display("A = L L^T: n=%0d nz=%0d k-groups=%0d", N, nz, g);
    wait (ready);
    // ---- conjugate gradient ----
    for (int i = 0; i < N; i++) begin x[i] = 0.0; r[i] = b[i]; p[i] = r[i]; end
    dn = dot(r, r);
    r0 = $sqrt(dn);
    it = 0; badsum = 0;
    while ($sqrt(dn) / r0 > 1e-9 && it < MAXIT) begin
      hw_matvec(bad);
      badsum += bad;
      alpha = dn / dot(p, q);
      for (int i = 0; i < N; i++) begin x[i] += alpha * p[i]; r[i] -= alpha * q[i]; end
      dc = dn;
      dn = dot(r, r);
      for (int i = 0; i < N; i++) p[i] = r[i] + (dn / dc) * p[i];
      it++;
    end
    maxerr = 0.0;
    for (int i = 0; i < N; i++) begin
      real e;
      e = (x[i] - 100.0) / 100.0;
      if (e < 0.0) e = -e;
      if (e > maxerr) maxerr = e;
    end
    $display("CG: %0d iterations, relative residual %e, max relative error of x %e", it,
             $sqrt(dn) / r0, maxerr);
    checks++; if (badsum != 0) begin failures++; $display("%0d q values off", badsum); end
    checks++; if (it >= MAXIT) begin failures++; $display("CG did not converge"); end
    checks++; if (maxerr > 1e-6) begin failures++; $display("solution differs from x_h"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
