// accumulator: ALPHA_V-input floating-point adder tree.
//
// ALPHA_V binary64 values are accepted every clock cycle and their sum
// leaves ALPHA_A * ceil(lg ALPHA_V) cycles later (56 cycles for ALPHA_V = 14,
// ALPHA_A = 14); a new sum completes every cycle once the pipeline is full.
// Level l of the tree pairs the values of level l-1; when a level has an odd
// count, its last value passes through a delay unit of ALPHA_A cycles so that
// it meets its partner on time, which is how the reference design handles an
// ALPHA_V that is not a power of two. A valid bit and a TAG_W-bit tag (this
// design's addition, used to carry a row index) travel with the data.
module accumulator
  import cg_pkg::*;
#(
  parameter int unsigned ALPHA_V = ALPHA_V_DEF,
  parameter int unsigned ALPHA_A = ALPHA_A_DEF,
  parameter int unsigned TAG_W   = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  fp64_t            x [ALPHA_V],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output fp64_t            sum
);
  localparam int unsigned LEVELS  = (ALPHA_V <= 1) ? 0 : $clog2(ALPHA_V);
  localparam int unsigned LATENCY = ALPHA_A * LEVELS;

  // number of values at tree level l
  function automatic int unsigned cnt(input int unsigned l);
    int unsigned c = ALPHA_V;
    for (int unsigned i = 0; i < l; i++) c = (c + 1) / 2;
    return c;
  endfunction

  fp64_t node [LEVELS+1][ALPHA_V];

  for (genvar i = 0; i < ALPHA_V; i++) begin : g_in
    assign node[0][i] = x[i];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar i = 0; i < cnt(l + 1); i++) begin : g_node
      if (2 * i + 1 < cnt(l)) begin : g_add
        fp_add64 #(.LAT(ALPHA_A)) u_add (
          .clk(clk), .a(node[l][2*i]), .b(node[l][2*i+1]), .y(node[l+1][i]));
      end else begin : g_dly
        fp_delay #(.W(64), .LAT(ALPHA_A)) u_dly (
          .clk(clk), .din(node[l][2*i]), .dout(node[l+1][i]));
      end
    end
    for (genvar i = cnt(l + 1); i < ALPHA_V; i++) begin : g_tie
      assign node[l+1][i] = '0;
    end
  end

  assign sum = node[LEVELS][0];

  if (LATENCY == 0) begin : g_nolat
    assign {out_valid, out_tag} = {in_valid, in_tag};
  end else begin : g_side
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
  end

endmodule
