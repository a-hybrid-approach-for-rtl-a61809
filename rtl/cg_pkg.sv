// cg_pkg: types and default sizes shared by the sparse matrix-vector multiply
// hardware module of the conjugate-gradient accelerator.
//
// The defaults are the reference configuration: a 4-wide dot product (K),
// a 14-cycle adder loop interval for the partial summation (ALPHA_V), a
// 10-cycle multiplier and a 14-cycle adder (ALPHA_M, ALPHA_A), matrices of up
// to 2,048 rows (N_MAX) and 262,144 non-zeros (NZ_MAX = 2^16 k-groups).
// The bank numbering, the 16-bit column index and the 17-bit row pointer are
// this design's choices where the reference leaves the detail open.
package cg_pkg;

  typedef logic [63:0] fp64_t;          // IEEE-754 binary64 bit pattern

  localparam int unsigned K_DEF       = 4;
  localparam int unsigned ALPHA_V_DEF = 14;
  localparam int unsigned ALPHA_M_DEF = 10;
  localparam int unsigned ALPHA_A_DEF = 14;
  localparam int unsigned N_MAX_DEF   = 2048;
  localparam int unsigned NZ_MAX_DEF  = 262144;
  localparam int unsigned GROUPS_DEF  = NZ_MAX_DEF / K_DEF;   // 65,536 k-groups

  localparam int unsigned COL_W = 16;   // packed column index width
  localparam int unsigned PTR_W = 17;   // row pointer in k-groups, 0 .. 2^16

  // Column banks needed for K packed 16-bit indices (1 for K = 4, 2 for K = 8).
  function automatic int unsigned ncol_banks(input int unsigned k);
    return (k * COL_W + 63) / 64;
  endfunction

  // Local memory banks: K value banks, then the col banks, then jptr.
  localparam int unsigned NBANKS_DEF = K_DEF + ncol_banks(K_DEF) + 1;

  function automatic int unsigned clog2c(input int unsigned v);
    return (v <= 1) ? 1 : $clog2(v);
  endfunction

endpackage
