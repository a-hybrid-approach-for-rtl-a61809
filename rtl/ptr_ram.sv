// ptr_ram: block RAM on the first FPGA holding the CSR row-pointer vector.
//
// Entry i (0 <= i <= n) is the index of the first k-group of row i in the
// k-aligned val/col arrays; entry n is the total number of k-groups. It is
// written once per solve during the startup sequence and read by the
// controller, which uses entries 0 and n as the bounds of the stream of
// k-groups. One write port, one registered read port (data valid the cycle
// after the address). Entries are PTR_W = 17 bits so that 2^16 k-groups, the
// full capacity, can be represented as an end pointer.
module ptr_ram
  import cg_pkg::*;
#(
  parameter int unsigned N_MAX = N_MAX_DEF,
  parameter int unsigned AW    = $clog2(N_MAX + 1)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [PTR_W-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [PTR_W-1:0] rdata
);
  logic [PTR_W-1:0] mem [N_MAX + 1];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
