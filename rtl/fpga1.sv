// fpga1: configuration of the first FPGA (dot products and host I/O).
//
// It holds the row-pointer RAM, K copies of p and the K x K dot product core.
// In the execute sequence the controller walks the k-groups of the k-aligned
// matrix: each cycle the K value banks and the col banks of the local memory
// (one for K = 4, two for K = 8) are read at the same address; the col words
// are unpacked into K 16-bit column indices (index h in col bank h/4, bits
// 16(h mod 4)+15:16(h mod 4)) that address the K copies of
// p, while the K values wait one cycle in registers at the x inputs. The
// paired a_ij and p_j therefore reach the dot product together, one k-group
// per cycle, and the dot products (the last one marked) leave on the dp_*
// channel to the second FPGA. Row sums q_i coming back on q_in_* are
// forwarded to the host on q_out_*; done pulses after the n-th.
// Timing: local memory address at cycle t, dot product inputs at t+2,
// dot product out at t+2+ALPHA_M+ALPHA_A*lg K.
module fpga1
  import cg_pkg::*;
#(
  parameter int unsigned K       = K_DEF,
  parameter int unsigned N_MAX   = N_MAX_DEF,
  parameter int unsigned ALPHA_M = ALPHA_M_DEF,
  parameter int unsigned ALPHA_A = ALPHA_A_DEF,
  parameter int unsigned RW      = $clog2(N_MAX),
  parameter int unsigned PAW     = $clog2(N_MAX + 1),
  parameter int unsigned GAW     = $clog2(GROUPS_DEF)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RW:0]      n_rows,
  // startup sequence: row pointers
  input  logic             ptr_we,
  input  logic [PAW-1:0]   ptr_waddr,
  input  logic [PTR_W-1:0] ptr_wdata,
  // input sequence: p, one element per valid cycle
  input  logic             p_in_valid,
  input  fp64_t            p_in_data,
  input  logic             start,
  // local memory: K value banks and the NCOL col banks
  output logic [GAW-1:0]   mem_raddr [K+ncol_banks(K)],
  input  logic [63:0]      mem_rdata [K+ncol_banks(K)],
  // channel to the second FPGA
  output logic             dp_valid,
  output logic             dp_last,
  output fp64_t            dp_data,
  // channel from the second FPGA
  input  logic             q_in_valid,
  input  fp64_t            q_in_data,
  // output sequence: q to the host
  output logic             q_out_valid,
  output fp64_t            q_out_data,
  output logic             busy,
  output logic             done
);
  localparam int unsigned NCOL = ncol_banks(K);

  logic             p_we;
  logic [RW-1:0]    p_waddr;
  logic [PAW-1:0]   ptr_raddr;
  logic [PTR_W-1:0] ptr_rdata;
  logic [GAW-1:0]   grp_addr;
  logic             grp_valid, grp_last;
  logic [RW-1:0]    p_raddr [K];
  fp64_t            p_rdata [K];
  fp64_t            val_q   [K];

  f1_ctrl #(.N_MAX(N_MAX), .RW(RW), .PAW(PAW), .GAW(GAW)) u_ctrl (
    .clk, .rst_n, .n_rows, .start, .p_in_valid, .p_we, .p_waddr,
    .ptr_raddr, .ptr_rdata, .grp_addr, .grp_valid, .grp_last,
    .q_valid(q_in_valid), .busy, .done);

  ptr_ram #(.N_MAX(N_MAX), .AW(PAW)) u_ptr (
    .clk, .we(ptr_we), .waddr(ptr_waddr), .wdata(ptr_wdata),
    .raddr(ptr_raddr), .rdata(ptr_rdata));

  for (genvar b = 0; b < K + NCOL; b++) begin : g_addr
    assign mem_raddr[b] = grp_addr;
  end

  // unpack the col word and register the values
  for (genvar h = 0; h < K; h++) begin : g_leaf
    assign p_raddr[h] = mem_rdata[K + (COL_W*h) / 64][(COL_W*h) % 64 +: RW];
    always_ff @(posedge clk) val_q[h] <= mem_rdata[h];
  end

  p_copies #(.K(K), .N_MAX(N_MAX), .AW(RW)) u_p (
    .clk, .we(p_we), .waddr(p_waddr), .wdata(p_in_data),
    .raddr(p_raddr), .rdata(p_rdata));

  dot_product #(.K(K), .ALPHA_M(ALPHA_M), .ALPHA_A(ALPHA_A), .TAG_W(1)) u_dp (
    .clk, .rst_n, .in_valid(grp_valid), .in_tag(grp_last), .x(val_q), .y(p_rdata),
    .out_valid(dp_valid), .out_tag(dp_last), .dp(dp_data));

  assign q_out_valid = q_in_valid;
  assign q_out_data  = q_in_data;

endmodule
