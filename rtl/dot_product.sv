// dot_product: K x K floating-point dot product core.
//
// Two binary64 K-vectors x and y are accepted every clock cycle. K
// multipliers form x_i * y_i, and a full binary tree of adders with lg K
// levels reduces the K products to one sum, so once the pipeline is full one
// dot product leaves every cycle. The latency is ALPHA_M + ALPHA_A * lg K
// cycles (38 for K = 4, ALPHA_M = 10, ALPHA_A = 14), as in the reference
// design. K must be a power of two.
//
// A valid bit and a TAG_W-bit tag travel alongside the data with the same
// latency (the tag is this design's addition: it carries an end-of-stream
// mark). Only the valid pipeline is reset.
module dot_product
  import cg_pkg::*;
#(
  parameter int unsigned K       = K_DEF,
  parameter int unsigned ALPHA_M = ALPHA_M_DEF,
  parameter int unsigned ALPHA_A = ALPHA_A_DEF,
  parameter int unsigned TAG_W   = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  fp64_t            x [K],
  input  fp64_t            y [K],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output fp64_t            dp
);
  localparam int unsigned LGK     = $clog2(K);
  localparam int unsigned LATENCY = ALPHA_M + ALPHA_A * LGK;

  initial assert (K >= 1 && (1 << LGK) == K) else $error("dot_product: K must be a power of two");

  // node[l][i]: i-th value at tree level l (level 0 = products)
  fp64_t node [LGK+1][K];

  for (genvar i = 0; i < K; i++) begin : g_mul
    fp_mul64 #(.LAT(ALPHA_M)) u_mul (.clk(clk), .a(x[i]), .b(y[i]), .y(node[0][i]));
  end

  for (genvar l = 0; l < LGK; l++) begin : g_lvl
    for (genvar i = 0; i < (K >> (l + 1)); i++) begin : g_add
      fp_add64 #(.LAT(ALPHA_A)) u_add (
        .clk(clk), .a(node[l][2*i]), .b(node[l][2*i+1]), .y(node[l+1][i]));
    end
    // unused upper entries of the level are tied off
    for (genvar i = (K >> (l + 1)); i < K; i++) begin : g_tie
      assign node[l+1][i] = '0;
    end
  end

  assign dp = node[LGK][0];

  // valid and tag pipeline of the same latency
  logic [TAG_W:0] side_q [LATENCY];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) side_q[i] <= '0;
    end else begin
      side_q[0] <= {in_valid, in_tag};
      for (int i = 1; i < LATENCY; i++) side_q[i] <= side_q[i-1];
    end
  end
  assign {out_valid, out_tag} = side_q[LATENCY-1];

endmodule
