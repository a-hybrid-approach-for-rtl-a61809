// p_copies: K identical on-chip copies of the search-direction vector p.
//
// The dot product needs K different elements of p in the same cycle, one for
// each y input, so p is stored K times, once per dot-product leaf. During
// the input sequence each element arrives once on the write port and is
// written into all K copies at the same address. During the execute sequence
// copy h is read at address raddr[h] (a column index); rdata[h] is registered
// and valid the cycle after the address (block-RAM timing).
// N_MAX words of 64 bits per copy; addresses wider than needed are truncated.
module p_copies
  import cg_pkg::*;
#(
  parameter int unsigned K     = K_DEF,
  parameter int unsigned N_MAX = N_MAX_DEF,
  parameter int unsigned AW    = $clog2(N_MAX)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  fp64_t         wdata,
  input  logic [AW-1:0] raddr [K],
  output fp64_t         rdata [K]
);
  for (genvar h = 0; h < K; h++) begin : g_copy
    fp64_t mem [N_MAX];
    always_ff @(posedge clk) begin
      if (we) mem[waddr] <= wdata;
      rdata[h] <= mem[raddr[h]];
    end
  end
endmodule
