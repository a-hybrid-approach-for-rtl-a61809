// tb_accumulator: self-checking test of the 14-input adder tree (reference
// sizes: ALPHA_V = 14, 14-cycle adder). Sets of 14 small integers or
// multiples of 1/64 (exact in any summation order) are issued with random
// gaps, including back-to-back. Each sum must match the independently
// computed one and arrive exactly ALPHA_A * ceil(lg 14) = 56 cycles later,
// which also shows that the delay units keep the odd branches in step.
module tb_accumulator;
  localparam int unsigned AV = 14, AA = 14;
  localparam int unsigned LAT = AA * 4;
  localparam int unsigned N = 600;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic        in_valid = 1'b0, out_valid;
  logic [11:0] in_tag = '0, out_tag;
  logic [63:0] x [AV], sum;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [63:0] v; int t; logic [11:0] tag; } exp_t;
  exp_t q [$];

  accumulator #(.ALPHA_V(AV), .ALPHA_A(AA), .TAG_W(12)) dut (
    .clk, .rst_n, .in_valid, .in_tag, .x, .out_valid, .out_tag, .sum);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("unexpected output");
    end else begin
      e = q.pop_front();
      if (sum !== e.v || out_tag !== e.tag || cyc - e.t != LAT) begin
        failures++;
        if (failures < 10) $display("got %h tag %0d lat %0d, exp %h tag %0d lat %0d",
                                    sum, out_tag, cyc - e.t, e.v, e.tag, LAT);
      end
    end
  end

  initial begin
    for (int i = 0; i < AV; i++) x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      real acc;
      @(negedge clk);
      if (n > N / 3 && ($urandom % 3) == 0) begin
        in_valid = 1'b0;
      end else begin
        acc = 0.0;
        for (int i = 0; i < AV; i++) begin
          real xr;
          // one input at a time is made large so that each leaf,
          // including those behind a delay unit, is seen to count
          if (n % 3 == 0) xr = real'(int'($urandom % 2001) - 1000);
          else            xr = real'(int'($urandom % 8192)) / 64.0;
          if (i == n % AV) xr = xr + 65536.0 * real'(i + 1);
          x[i] = $realtobits(xr);
          acc = acc + xr;
        end
        in_valid = 1'b1;
        in_tag = 12'(n);
        q.push_back('{v: $realtobits(acc), t: cyc, tag: 12'(n)});
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
