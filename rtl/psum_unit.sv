// psum_unit: partial summation unit of the second FPGA.
//
// Dot products arrive at most one per cycle, each with the row index jptr(j)
// it belongs to. The j-th dot product (j counted from 0 since the last start
// pulse) is added to S(jptr(j), j mod ALPHA_V): it is used as the address of
// a read-modify-write through a pipelined ALPHA_A-cycle adder, and because
// consecutive products go to consecutive columns, any one element of S is
// touched at most once every ALPHA_V cycles. That interval is what lets the
// loop run at full rate despite the adder latency, and it requires
// ALPHA_V >= ALPHA_A. With ALPHA_V == ALPHA_A (the reference sizes, 14 and
// 14) the write of one sum lands in the very cycle the next product for the
// same element reads it, so the sum being written is forwarded to the adder
// input then (the same effect as a write-first block RAM).
//
// Interface: rd_row/rd_data is the read side of S (combinational), wr_* its
// write side; busy is high while sums are still in the adder.
module psum_unit
  import cg_pkg::*;
#(
  parameter int unsigned N_MAX   = N_MAX_DEF,
  parameter int unsigned ALPHA_V = ALPHA_V_DEF,
  parameter int unsigned ALPHA_A = ALPHA_A_DEF,
  parameter int unsigned RW      = $clog2(N_MAX),
  parameter int unsigned CW      = clog2c(ALPHA_V)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,       // restart j at 0
  input  logic          in_valid,
  input  fp64_t         in_data,
  input  logic [RW-1:0] in_row,
  // S array access
  output logic [RW-1:0] rd_row,
  input  fp64_t         rd_data [ALPHA_V],
  output logic          wr_en,
  output logic [RW-1:0] wr_row,
  output logic [CW-1:0] wr_col,
  output fp64_t         wr_data,
  output logic          busy,
  output logic          fwd          // forwarding used this cycle (for observation)
);
  initial assert (ALPHA_V >= ALPHA_A && ALPHA_A >= 1)
    else $error("psum_unit: ALPHA_V must be at least ALPHA_A");

  logic [CW-1:0] col_q;               // j mod ALPHA_V
  fp64_t         old_val, sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        col_q <= '0;
    else if (start)    col_q <= '0;
    else if (in_valid) col_q <= (col_q == CW'(ALPHA_V - 1)) ? '0 : col_q + 1'b1;
  end

  assign rd_row = in_row;
  assign fwd    = in_valid && wr_en && (wr_row == in_row) && (wr_col == col_q);

  always_comb begin
    old_val = rd_data[col_q];
    if (fwd) old_val = wr_data;
  end

  fp_add64 #(.LAT(ALPHA_A)) u_add (.clk(clk), .a(in_data), .b(old_val), .y(sum));

  // address pipeline alongside the adder
  logic          v_q   [ALPHA_A];
  logic [RW-1:0] row_q [ALPHA_A];
  logic [CW-1:0] c_q   [ALPHA_A];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < ALPHA_A; i++) v_q[i] <= 1'b0;
    else begin
      v_q[0] <= in_valid;
      for (int i = 1; i < ALPHA_A; i++) v_q[i] <= v_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    row_q[0] <= in_row;
    c_q[0]   <= col_q;
    for (int i = 1; i < ALPHA_A; i++) begin
      row_q[i] <= row_q[i-1];
      c_q[i]   <= c_q[i-1];
    end
  end

  assign wr_en   = v_q[ALPHA_A-1];
  assign wr_row  = row_q[ALPHA_A-1];
  assign wr_col  = c_q[ALPHA_A-1];
  assign wr_data = sum;

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i < ALPHA_A; i++) busy |= v_q[i];
  end

endmodule
