// tb_fp_add64: self-checking test of the pipelined binary64 adder.
// Random normal operands (exponents kept away from overflow and the subnormal
// range, so the simplifications of the adder do not apply), close operands
// that cancel, and a few special values are fed one pair per cycle. The
// expected sum is computed with the simulator's own double arithmetic and the
// result must match bit for bit exactly LAT cycles after the operands.
module tb_fp_add64;
  localparam int unsigned LAT = 14;
  localparam int unsigned N   = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] a, b, y;
  logic [63:0] exp_q [$];
  int checks = 0, failures = 0;

  fp_add64 #(.LAT(LAT)) dut (.clk(clk), .a(a), .b(b), .y(y));

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
          if (failures < 10) $display("mismatch %0d @%0t: got %h exp %h", i, $time, y, e);
        end
      end
      if (i < N) begin
        case (i % 8)
          0, 1, 2, 3: begin a = rnd_fp(40); b = rnd_fp(40); end
          4: begin a = rnd_fp(3); b = a ^ 64'h8000_0000_0000_0000;          // cancel to zero
                   b[2:0] = 3'($urandom); end
          5: begin a = rnd_fp(5); b = {~a[63], a[62:52], 52'($urandom)}; end // near cancellation
          6: begin a = rnd_fp(10); b = rnd_fp(10); b[62:52] = a[62:52] - 11'($urandom % 60); end
          default: begin
            a = rnd_fp(20);
            case ($urandom % 3)
              0: b = 64'd0;
              1: b = 64'h8000_0000_0000_0000;
              default: b = a;
            endcase
          end
        endcase
        exp_q.push_back($realtobits($bitstoreal(a) + $bitstoreal(b)));
      end else begin
        a = '0; b = '0;
      end
    end
    // special values
    @(negedge clk); a = 64'h7FF0_0000_0000_0000; b = 64'h3FF0_0000_0000_0000;
    repeat (LAT) @(negedge clk);
    checks++; if (y !== 64'h7FF0_0000_0000_0000) begin failures++; $display("inf+1 -> %h", y); end
    a = 64'h7FF0_0000_0000_0000; b = 64'hFFF0_0000_0000_0000;
    repeat (LAT) @(negedge clk);
    checks++; if (y !== 64'h7FF8_0000_0000_0000) begin failures++; $display("inf-inf -> %h", y); end
    a = 64'h7FEF_FFFF_FFFF_FFFF; b = 64'h7FEF_FFFF_FFFF_FFFF;
    repeat (LAT) @(negedge clk);
    checks++; if (y !== 64'h7FF0_0000_0000_0000) begin failures++; $display("overflow -> %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
