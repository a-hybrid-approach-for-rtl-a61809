// fp_mul64: pipelined IEEE-754 binary64 multiplier with a latency of LAT
// cycles and one new operand pair accepted every cycle.
//
// One combinational stage multiplies the 53-bit significands, normalises the
// 106-bit product and rounds it to nearest even; a LAT-deep register pipeline
// follows, its placement left to retiming. The latency (10 cycles) is the one
// the accelerator is built around; the internals are this design's own, as
// the multiplier itself is an existing library core. Simplifications:
// subnormal inputs are read as zero, results below the normal range are
// flushed to a signed zero, Inf and NaN propagate (Inf x 0 gives the quiet
// NaN 0x7FF8_0000_0000_0000).
//
// Timing: a, b sampled at a rising edge appear as y LAT edges later.
module fp_mul64
  import cg_pkg::*;
#(
  parameter int unsigned LAT = ALPHA_M_DEF
) (
  input  logic  clk,
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y
);
  localparam fp64_t QNAN = 64'h7FF8_0000_0000_0000;

  fp64_t prod;

  always_comb begin
    logic         sa, sb, sr;
    logic [10:0]  ea, eb;
    logic [51:0]  ma, mb;
    logic [105:0] p;
    logic [52:0]  m;
    logic         g, st, rup;
    logic [53:0]  rnd;
    logic signed [13:0] er;
    logic         a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sr     = sa ^ sb;
    a_zero = (ea == 11'd0);
    b_zero = (eb == 11'd0);
    a_inf  = (ea == 11'h7FF) && (ma == 52'd0);
    b_inf  = (eb == 11'h7FF) && (mb == 52'd0);
    a_nan  = (ea == 11'h7FF) && (ma != 52'd0);
    b_nan  = (eb == 11'h7FF) && (mb != 52'd0);
    p = '0; m = '0; g = 1'b0; st = 1'b0; rup = 1'b0; rnd = '0; er = '0;

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      prod = QNAN;
    end else if (a_inf || b_inf) begin
      prod = {sr, 11'h7FF, 52'd0};
    end else if (a_zero || b_zero) begin
      prod = {sr, 63'd0};
    end else begin
      p  = {1'b1, ma} * {1'b1, mb};
      er = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 14'sd1023;
      if (p[105]) begin
        m  = p[105:53];
        g  = p[52];
        st = (p[51:0] != 52'd0);
        er = er + 14'sd1;
      end else begin
        m  = p[104:52];
        g  = p[51];
        st = (p[50:0] != 51'd0);
      end
      rup = g & (st | m[0]);
      rnd = {1'b0, m} + {53'd0, rup};
      if (rnd[53]) begin
        rnd = rnd >> 1;
        er  = er + 14'sd1;
      end
      if (er <= 14'sd0)         prod = {sr, 63'd0};
      else if (er >= 14'sd2047) prod = {sr, 11'h7FF, 52'd0};
      else                      prod = {sr, er[10:0], rnd[51:0]};
    end
  end

  fp_delay #(.W(64), .LAT(LAT)) u_pipe (.clk(clk), .din(prod), .dout(y));

endmodule
