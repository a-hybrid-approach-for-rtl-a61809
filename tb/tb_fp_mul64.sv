// tb_fp_mul64: self-checking test of the pipelined binary64 multiplier.
// Random normal operands whose product stays in the normal range, plus exact
// small products and special values, one pair per cycle. The expected product
// is the simulator's own double multiplication; results must match bit for
// bit exactly LAT cycles after the operands were applied.
module tb_fp_mul64;
  localparam int unsigned LAT = 10;
  localparam int unsigned N   = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] a, b, y;
  logic [63:0] exp_q [$];
  int checks = 0, failures = 0;

  fp_mul64 #(.LAT(LAT)) dut (.clk(clk), .a(a), .b(b), .y(y));

  function automatic logic [63:0] rnd_fp(input int span);
    logic [63:0] r;
    r[63]    = 1'($urandom);
    r[62:52] = 11'(1023 - span + int'($urandom % (2 * span + 1)));
    r[51:0]  = {20'($urandom), 32'($urandom)};
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < N + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        logic [63:0] e;
        e = exp_q.pop_front();
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("mismatch %0d: got %h exp %h", i, y, e);
        end
      end
      if (i < N) begin
        case (i % 4)
          0, 1: begin a = rnd_fp(400); b = rnd_fp(400); end
          2: begin a = $realtobits(real'(int'($urandom % 2001) - 1000));
                   b = $realtobits(real'(int'($urandom % 2001) - 1000)); end
          default: begin a = rnd_fp(5); b = rnd_fp(5); end
        endcase
        exp_q.push_back($realtobits($bitstoreal(a) * $bitstoreal(b)));
      end else begin
        a = '0; b = '0;
      end
    end
    @(negedge clk); a = 64'h7FF0_0000_0000_0000; b = 64'd0;
    repeat (LAT) @(negedge clk);
    checks++; if (y !== 64'h7FF8_0000_0000_0000) begin failures++; $display("inf*0 -> %h", y); end
    a = 64'h7FE0_0000_0000_0000; b = 64'h4010_0000_0000_0000;
    repeat (LAT) @(negedge clk);
    checks++; if (y !== 64'h7FF0_0000_0000_0000) begin failures++; $display("overflow -> %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
