// local_memory: the on-board memory banks next to the two FPGAs.
//
// NBANKS independent banks of 64-bit words. For k-group g, at address g:
// banks 0..K-1 hold the K values v (one value bank per dot-product leaf,
// rows zero-padded to a multiple of K); the next K/4 banks the K 16-bit
// column indices, four per word (index h in bank K + h/4, bits
// 16(h mod 4)+15:16(h mod 4)); the last bank the row index jptr(g) in its
// low bits. With K = 4 that is 6 banks: 4 val, 1 col, 1 jptr. The host fills the banks
// through the single write port during the startup sequence; each bank then
// has its own read port with registered data (valid one cycle after the
// address). DEPTH = 2^16 words covers the 262,144 non-zeros the design
// accepts; the board memory itself is larger.
module local_memory
  import cg_pkg::*;
#(
  parameter int unsigned NBANKS = NBANKS_DEF,
  parameter int unsigned DEPTH  = GROUPS_DEF,
  parameter int unsigned AW     = $clog2(DEPTH),
  parameter int unsigned BW     = clog2c(NBANKS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [BW-1:0] wbank,
  input  logic [AW-1:0] waddr,
  input  logic [63:0]   wdata,
  input  logic [AW-1:0] raddr [NBANKS],
  output logic [63:0]   rdata [NBANKS]
);
  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    logic [63:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we && wbank == BW'(b)) mem[waddr] <= wdata;
      rdata[b] <= mem[raddr[b]];
    end
  end
endmodule
