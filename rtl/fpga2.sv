// fpga2: configuration of the second FPGA (partial summation and output).
//
// Dot products from the first FPGA arrive on the dp_* channel, at most one
// per cycle, the last one of an iteration marked. The controller pairs each
// with its row index from the jptr bank of the local memory and the partial
// summation unit adds it into the N_MAX x ALPHA_V array S. Once all have been
// added, each of the n rows of S is summed by the ALPHA_V-input accumulator;
// the row sums q_0..q_{n-1} leave in row order on the q_* channel (q_row is
// the row of q_data), one per cycle, and the rows are cleared for the next iteration. ready is high while
// the FPGA can take dot products; done pulses when the last q has left the
// accumulator.
module fpga2
  import cg_pkg::*;
#(
  parameter int unsigned N_MAX   = N_MAX_DEF,
  parameter int unsigned ALPHA_V = ALPHA_V_DEF,
  parameter int unsigned ALPHA_A = ALPHA_A_DEF,
  parameter int unsigned RW      = $clog2(N_MAX),
  parameter int unsigned JAW     = $clog2(GROUPS_DEF)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [RW:0]    n_rows,
  input  logic           dp_valid,
  input  logic           dp_last,
  input  fp64_t          dp_data,
  output logic [JAW-1:0] jptr_addr,
  input  logic [63:0]    jptr_data,
  output logic           q_valid,
  output fp64_t          q_data,
  output logic [RW-1:0]  q_row,
  output logic           ready,
  output logic           done,
  output logic           fwd
);
  localparam int unsigned CW = clog2c(ALPHA_V);

  logic          ps_start, ps_valid, ps_busy;
  logic [RW-1:0] ps_row, ps_rd_row, out_row, clr_row, wr_row;
  logic          out_mode, clr_en, wr_en, acc_valid;
  logic [CW-1:0] wr_col;
  fp64_t         wr_data;
  fp64_t         s_rd [ALPHA_V];

  f2_ctrl #(.N_MAX(N_MAX), .RW(RW), .JAW(JAW)) u_ctrl (
    .clk, .rst_n, .n_rows, .dp_valid, .dp_last, .jptr_addr, .jptr_data,
    .ps_start, .ps_valid, .ps_row, .ps_busy, .out_mode, .out_row, .clr_en, .clr_row,
    .acc_valid, .acc_out_valid(q_valid), .ready, .done);

  psum_unit #(.N_MAX(N_MAX), .ALPHA_V(ALPHA_V), .ALPHA_A(ALPHA_A), .RW(RW), .CW(CW)) u_psum (
    .clk, .rst_n, .start(ps_start), .in_valid(ps_valid), .in_data(dp_data), .in_row(ps_row),
    .rd_row(ps_rd_row), .rd_data(s_rd), .wr_en, .wr_row, .wr_col, .wr_data,
    .busy(ps_busy), .fwd);

  s_array #(.N_MAX(N_MAX), .ALPHA_V(ALPHA_V), .RW(RW), .CW(CW)) u_s (
    .clk, .rd_row(out_mode ? out_row : ps_rd_row), .rd_data(s_rd),
    .wr_en, .wr_row, .wr_col, .wr_data, .clr_en, .clr_row);

  accumulator #(.ALPHA_V(ALPHA_V), .ALPHA_A(ALPHA_A), .TAG_W(RW)) u_acc (
    .clk, .rst_n, .in_valid(acc_valid), .in_tag(out_row), .x(s_rd),
    .out_valid(q_valid), .out_tag(q_row), .sum(q_data));

endmodule
