// tb_fpga1: self-checking test of the first FPGA (K = 4, 10-cycle multiplier,
// 14-cycle adder; N_MAX = 64 for a short run) with a model of the K value
// banks and the col bank of the local memory (one-cycle read latency).
// A k-aligned matrix of small integers (zero padding in the last k-group of
// some rows) and the row pointers are loaded, p is streamed in, and start is
// pulsed. Every dot product must equal the sum of a_ij * p_j of its k-group
// (worked out here), the G products must leave on consecutive cycles with
// the last one marked, and the first must leave 43 cycles after start: 2 to
// read ptr[n], 1 to issue the address, 2 through the local memory and the p
// copies, 38 through the dot product core. Then q values fed back must be
// forwarded to the host port and done must pulse after the n-th.
module tb_fpga1;
  localparam int K = 4, N = 64, RW = 6, PAW = 7, GAW = 16, NR = 30;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic [RW:0] n_rows = 7'(NR);
  logic ptr_we = 1'b0, p_in_valid = 1'b0, start = 1'b0, q_in_valid = 1'b0;
  logic [PAW-1:0] ptr_waddr = '0;
  logic [16:0] ptr_wdata = '0;
  logic [63:0] p_in_data = '0, q_in_data = '0;
  logic [GAW-1:0] mem_raddr [K+1];
  logic [63:0] mem_rdata [K+1];
  logic dp_valid, dp_last, q_out_valid, busy, done;
  logic [63:0] dp_data, q_out_data;
  logic [63:0] bank [K+1][1024];
  int checks = 0, failures = 0;

  fpga1 #(.N_MAX(N), .GAW(GAW)) dut (.*);

  for (genvar b = 0; b <= K; b++) begin : g_bank
    always_ff @(posedge clk) mem_rdata[b] <= bank[b][mem_raddr[b][9:0]];
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real dref [$];
  real p [NR];
  int  ndp, nlast, first_dp, last_dp, ndone, nqo;
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n) begin
    if (dp_valid) begin
      checks++;
      if (ndp == 0) first_dp = cyc;
      last_dp = cyc;
      if (ndp >= dref.size() || dp_data !== $realtobits(dref[ndp])) begin
        failures++;
        if (failures < 10) $display("dot product %0d = %f expected %f", ndp, $bitstoreal(dp_data), dref[ndp]);
      end
      if (dp_last) nlast++;
      ndp++;
    end
    if (done) ndone++;
    if (q_out_valid) begin
      checks++;
      if (q_out_data !== 64'(nqo * 3 + 1)) begin failures++; $display("q_out %0d = %h", nqo, q_out_data); end
      nqo++;
    end
  end

  initial begin
    int G, npad, t0;
    ndp = 0; nlast = 0; ndone = 0; nqo = 0; npad = 0;
    for (int j = 0; j < NR; j++) p[j] = real'(int'($urandom % 41) - 20);
    // k-aligned matrix into the bank model
    G = 0;
    for (int r = 0; r < NR; r++) begin
      int len;
      len = 1 + int'($urandom % 11);
      for (int e0 = 0; e0 < len; e0 += K) begin
        real acc;
        logic [63:0] cw;
        acc = 0.0; cw = '0;
        for (int h = 0; h < K; h++) begin
          if (e0 + h < len) begin
            real v;
            int c;
            v = real'(int'($urandom % 19) - 9);
            c = int'($urandom % NR);
            bank[h][G] = $realtobits(v);
            cw[16*h +: 16] = 16'(c);
            acc += v * p[c];
          end else begin
            bank[h][G] = 64'd0;
            cw[16*h +: 16] = 16'd0;
            npad++;
          end
        end
        bank[K][G] = cw;
        dref.push_back(acc);
        G++;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // startup: ptr[n] = G
    @(negedge clk); ptr_we = 1'b1; ptr_waddr = PAW'(NR); ptr_wdata = 17'(G);
    @(negedge clk); ptr_we = 1'b0;
    // input sequence
    for (int j = 0; j < NR; j++) begin
      @(negedge clk); p_in_valid = 1'b1; p_in_data = $realtobits(p[j]);
    end
    @(negedge clk); p_in_valid = 1'b0;
    start = 1'b1; t0 = cyc;
    @(negedge clk); start = 1'b0;
    wait (nlast > 0);
    repeat (3) @(negedge clk);
    checks++;
    if (ndp != G || nlast != 1 || last_dp - first_dp != G - 1) begin
      failures++; $display("%0d dot products over %0d cycles, %0d last", ndp, last_dp - first_dp + 1, nlast);
    end
    checks++;
    if (first_dp - t0 != 43) begin failures++; $display("first dot product after %0d cycles", first_dp - t0); end
    checks++;
    if (npad == 0) begin failures++; $display("no padding exercised"); end
    // output sequence: q values coming back from the second FPGA
    for (int i = 0; i < NR; i++) begin
      @(negedge clk); q_in_valid = 1'b1; q_in_data = 64'(i * 3 + 1);
    end
    @(negedge clk); q_in_valid = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (nqo != NR || ndone != 1 || busy) begin failures++; $display("%0d q out, %0d done, busy %b", nqo, ndone, busy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
