// fp_add64: pipelined IEEE-754 binary64 adder with a latency of LAT cycles
// and one new operand pair accepted every cycle.
//
// The sum is formed by one combinational stage (align the smaller operand
// with guard, round and sticky bits, add or subtract, normalise, round to
// nearest even) followed by a LAT-deep register pipeline, leaving the
// placement of the registers to retiming. The latency (14 cycles) is the one
// the accelerator is built around; the internals are this design's own, as
// the adder itself is an existing library core. Simplifications: subnormal
// inputs are read as zero and results that would be subnormal are flushed to
// a signed zero; infinities and NaNs propagate (a NaN result is the quiet
// NaN 0x7FF8_0000_0000_0000); an exact zero difference is +0.
//
// Timing: a, b sampled at a rising edge appear as y LAT edges later.
module fp_add64
  import cg_pkg::*;
#(
  parameter int unsigned LAT = ALPHA_A_DEF
) (
  input  logic  clk,
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y
);
  localparam fp64_t QNAN = 64'h7FF8_0000_0000_0000;

  fp64_t sum;

  always_comb begin
    logic        sx, sy, sr;
    logic [10:0] ex, ey;
    logic [51:0] mx, my;
    logic [55:0] x, yv, ysh, s;
    logic [56:0] s57;
    logic [11:0] d;
    logic signed [13:0] er;
    logic [53:0] rnd;
    logic        sticky, rup;
    int unsigned lz;

    // order the operands by magnitude: x is the larger
    if (a[62:0] >= b[62:0]) begin
      {sx, ex, mx} = a;
      {sy, ey, my} = b;
    end else begin
      {sx, ex, mx} = b;
      {sy, ey, my} = a;
    end
    sum = '0;
    s = '0; s57 = '0; ysh = '0; er = '0; rnd = '0; sticky = 1'b0; rup = 1'b0; lz = 0;
    sr = sx;
    x  = {1'b1, mx, 3'b000};
    yv = (ey == 11'd0) ? 56'd0 : {1'b1, my, 3'b000};
    d  = {1'b0, ex} - {1'b0, ey};

    if (ex == 11'h7FF) begin
      // x is Inf or NaN (x has the larger magnitude, so y can only be Inf/NaN too)
      if (mx != 52'd0 || (ey == 11'h7FF && my != 52'd0)) sum = QNAN;
      else if (ey == 11'h7FF && sx != sy)                 sum = QNAN;
      else                                                sum = {sx, 11'h7FF, 52'd0};
    end else if (ex == 11'd0) begin
      // both operands zero (or subnormal, read as zero)
      sum = {sx & sy, 63'd0};
    end else begin
      // align y to x, collecting the shifted-out bits into the sticky bit
      if (d >= 12'd56) begin
        ysh = {55'd0, (yv != 56'd0)};
      end else begin
        ysh    = yv >> d;
        sticky = ((yv & ((56'd1 << d) - 56'd1)) != 56'd0);
        ysh[0] = ysh[0] | sticky;
      end
      er = $signed({3'b000, ex});
      if (sx == sy) begin
        s57 = {1'b0, x} + {1'b0, ysh};
        if (s57[56]) begin
          s  = s57[56:1];
          s[0] = s[0] | s57[0];
          er = er + 14'sd1;
        end else begin
          s = s57[55:0];
        end
      end else begin
        s = x - ysh;
      end

      if (s == 56'd0) begin
        sum = 64'd0;                      // exact cancellation gives +0
      end else begin
        // normalise: bring the leading one to bit 55
        lz = 0;
        for (int i = 55; i >= 0; i--) begin
          if (s[i]) break;
          lz++;
        end
        s  = s << lz;
        er = er - 14'(lz);
        // round to nearest, ties to even, on guard / round / sticky
        rup = s[2] & (s[1] | s[0] | s[3]);
        rnd = {1'b0, s[55:3]} + {53'd0, rup};
        if (rnd[53]) begin
          rnd = rnd >> 1;
          er  = er + 14'sd1;
        end
        if (er <= 14'sd0)        sum = {sr, 63'd0};             // flush to zero
        else if (er >= 14'sd2047) sum = {sr, 11'h7FF, 52'd0};    // overflow
        else                     sum = {sr, er[10:0], rnd[51:0]};
      end
    end
  end

  fp_delay #(.W(64), .LAT(LAT)) u_pipe (.clk(clk), .din(sum), .dout(y));

endmodule
