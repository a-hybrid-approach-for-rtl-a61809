// cg_spmv_top: sparse matrix-vector multiply hardware module q = A p for a
// conjugate-gradient solver, built from two cooperating FPGAs and their
// local memory banks.
//
// The host loads the k-aligned CSR matrix once per solve (startup: the
// mem_w* port fills the val, col and jptr banks of the local memory, the
// ptr_w* port the row-pointer RAM of the first FPGA) and sets n_rows. For
// each CG iteration it streams p into the first FPGA (p_valid/p_data, n
// words), pulses start, and receives q_0..q_{n-1} in row order on
// q_valid/q_data; done pulses after the last. ready must be high before
// start (the second FPGA clears its summation array after reset).
// The first FPGA computes one K-wide dot product per cycle; a channel carries
// the products to the second FPGA, which accumulates them per row in the
// partial summation array and sums the rows; a second channel brings the
// q_i back. Per iteration the execute sequence takes one cycle per k-group
// plus the pipeline latencies, the output sequence one cycle per row plus
// the accumulator latency.
module cg_spmv_top
  import cg_pkg::*;
#(
  parameter int unsigned K        = K_DEF,
  parameter int unsigned ALPHA_V  = ALPHA_V_DEF,
  parameter int unsigned ALPHA_M  = ALPHA_M_DEF,
  parameter int unsigned ALPHA_A  = ALPHA_A_DEF,
  parameter int unsigned N_MAX    = N_MAX_DEF,
  parameter int unsigned NZ_MAX   = NZ_MAX_DEF,
  parameter int unsigned CHAN_LAT = 4,
  parameter int unsigned NBANKS   = K + ncol_banks(K) + 1,
  parameter int unsigned RW       = $clog2(N_MAX),
  parameter int unsigned PAW      = $clog2(N_MAX + 1),
  parameter int unsigned GAW      = $clog2(NZ_MAX / K),
  parameter int unsigned BW       = clog2c(NBANKS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RW:0]      n_rows,
  // startup sequence
  input  logic             mem_we,
  input  logic [BW-1:0]    mem_wbank,
  input  logic [GAW-1:0]   mem_waddr,
  input  logic [63:0]      mem_wdata,
  input  logic             ptr_we,
  input  logic [PAW-1:0]   ptr_waddr,
  input  logic [PTR_W-1:0] ptr_wdata,
  // input sequence
  input  logic             p_valid,
  input  fp64_t            p_data,
  input  logic             start,
  // output sequence
  output logic             q_valid,
  output fp64_t            q_data,
  output logic             ready,
  output logic             busy,
  output logic             done,
  // observation: forwarding in the partial summation unit
  output logic             psum_fwd
);
  logic [GAW-1:0] mem_raddr [NBANKS];
  logic [63:0]    mem_rdata [NBANKS];
  localparam int unsigned NCOL = ncol_banks(K);
  logic [GAW-1:0] f1_raddr  [K+NCOL];
  logic [63:0]    f1_rdata  [K+NCOL];
  logic [GAW-1:0] jptr_addr;

  logic  dp_valid, dp_last, dpc_valid, dpc_last;
  fp64_t dp_data, dpc_data;
  logic  q2_valid, qc_valid, f2_done;
  fp64_t q2_data, qc_data;
  logic [RW-1:0] q2_row;

  local_memory #(.NBANKS(NBANKS), .DEPTH(NZ_MAX / K), .AW(GAW), .BW(BW)) u_mem (
    .clk, .we(mem_we), .wbank(mem_wbank), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata));

  for (genvar b = 0; b < K + NCOL; b++) begin : g_f1bank
    assign mem_raddr[b] = f1_raddr[b];
    assign f1_rdata[b]  = mem_rdata[b];
  end
  assign mem_raddr[K+NCOL] = jptr_addr;

  fpga1 #(.K(K), .N_MAX(N_MAX), .ALPHA_M(ALPHA_M), .ALPHA_A(ALPHA_A),
          .RW(RW), .PAW(PAW), .GAW(GAW)) u_f1 (
    .clk, .rst_n, .n_rows, .ptr_we, .ptr_waddr, .ptr_wdata,
    .p_in_valid(p_valid), .p_in_data(p_data), .start,
    .mem_raddr(f1_raddr), .mem_rdata(f1_rdata),
    .dp_valid, .dp_last, .dp_data,
    .q_in_valid(qc_valid), .q_in_data(qc_data),
    .q_out_valid(q_valid), .q_out_data(q_data), .busy, .done);

  stream_channel #(.W(65), .LAT(CHAN_LAT)) u_ch12 (
    .clk, .rst_n, .in_valid(dp_valid), .in_data({dp_last, dp_data}),
    .out_valid(dpc_valid), .out_data({dpc_last, dpc_data}));

  fpga2 #(.N_MAX(N_MAX), .ALPHA_V(ALPHA_V), .ALPHA_A(ALPHA_A), .RW(RW), .JAW(GAW)) u_f2 (
    .clk, .rst_n, .n_rows, .dp_valid(dpc_valid), .dp_last(dpc_last), .dp_data(dpc_data),
    .jptr_addr, .jptr_data(mem_rdata[K+NCOL]),
    .q_valid(q2_valid), .q_data(q2_data), .q_row(q2_row),
    .ready, .done(f2_done), .fwd(psum_fwd));

  stream_channel #(.W(64), .LAT(CHAN_LAT)) u_ch21 (
    .clk, .rst_n, .in_valid(q2_valid), .in_data(q2_data),
    .out_valid(qc_valid), .out_data(qc_data));

endmodule
