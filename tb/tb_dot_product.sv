// tb_dot_product: self-checking test of the K x K dot product core at the
// reference sizes (K = 4, 10-cycle multiplier, 14-cycle adder). Vectors of
// small integers (so every sum is exact whatever the order) and of random
// fractions are issued with random gaps; each result must equal the
// independently computed dot product and appear exactly 38 cycles after its
// inputs, i.e. ALPHA_M + ALPHA_A * lg K. Back-to-back issue shows the
// one-result-per-cycle rate.
module tb_dot_product;
  localparam int unsigned K = 4, AM = 10, AA = 14;
  localparam int unsigned LAT = AM + AA * 2;
  localparam int unsigned N = 600;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic        in_valid = 1'b0, out_valid;
  logic [7:0]  in_tag = '0, out_tag;
  logic [63:0] x [K], y [K], dp;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [63:0] v; int t; logic [7:0] tag; } exp_t;
  exp_t q [$];

  dot_product #(.K(K), .ALPHA_M(AM), .ALPHA_A(AA), .TAG_W(8)) dut (
    .clk, .rst_n, .in_valid, .in_tag, .x, .y, .out_valid, .out_tag, .dp);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("unexpected output");
    end else begin
      e = q.pop_front();
      if (dp !== e.v || out_tag !== e.tag || cyc - e.t != LAT) begin
        failures++;
        if (failures < 10) $display("got %h tag %0d lat %0d, exp %h tag %0d lat %0d",
                                    dp, out_tag, cyc - e.t, e.v, e.tag, LAT);
      end
    end
  end

  initial begin
    for (int i = 0; i < K; i++) begin x[i] = '0; y[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      real acc;
      @(negedge clk);
      if (n > N / 2 && ($urandom % 4) == 0) begin
        in_valid = 1'b0;
      end else begin
        acc = 0.0;
        for (int i = 0; i < K; i++) begin
          real xr, yr;
          if (n % 2 == 0) begin
            xr = real'(int'($urandom % 201) - 100);
            yr = real'(int'($urandom % 201) - 100);
          end else begin
            xr = real'(int'($urandom % 4096)) / 64.0;
            yr = real'(int'($urandom % 4096)) / 1024.0;
          end
          x[i] = $realtobits(xr); y[i] = $realtobits(yr);
          acc = acc + xr * yr;
        end
        in_valid = 1'b1;
        in_tag = 8'(n);
        q.push_back('{v: $realtobits(acc), t: cyc, tag: 8'(n)});
      end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
