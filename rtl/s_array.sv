// s_array: the N_MAX-row by ALPHA_V-column partial summation array S.
//
// Column c of S is its own memory (N_MAX x 64 bits), so that a whole row can
// be read in one cycle by the ALPHA_V-input accumulator, while the partial
// summation unit reads and writes one column at a time. All columns share the
// read row address rd_row and return rd_data[c] in the same cycle
// (combinational read; the write of a cycle becomes visible in the next).
// One element is written per cycle through wr_*; clr_en writes zero to every
// column of row clr_row, which is how a row is emptied after it has been
// summed and how S is cleared after reset. clr_en takes priority over wr_en.
module s_array
  import cg_pkg::*;
#(
  parameter int unsigned N_MAX   = N_MAX_DEF,
  parameter int unsigned ALPHA_V = ALPHA_V_DEF,
  parameter int unsigned RW      = $clog2(N_MAX),
  parameter int unsigned CW      = clog2c(ALPHA_V)
) (
  input  logic          clk,
  input  logic [RW-1:0] rd_row,
  output fp64_t         rd_data [ALPHA_V],
  input  logic          wr_en,
  input  logic [RW-1:0] wr_row,
  input  logic [CW-1:0] wr_col,
  input  fp64_t         wr_data,
  input  logic          clr_en,
  input  logic [RW-1:0] clr_row
);
  for (genvar c = 0; c < ALPHA_V; c++) begin : g_col
    fp64_t mem [N_MAX];
    always_ff @(posedge clk) begin
      if (clr_en)                        mem[clr_row] <= '0;
      else if (wr_en && wr_col == CW'(c)) mem[wr_row] <= wr_data;
    end
    assign rd_data[c] = mem[rd_row];
  end
endmodule
