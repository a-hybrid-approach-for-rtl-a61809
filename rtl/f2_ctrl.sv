// f2_ctrl: controller of the second FPGA.
//
// After reset it clears the partial summation array S, one row per cycle
// (INIT), then waits for dot products (RUN). Each incoming dot product is
// handed to the partial summation unit together with its row index, which the
// controller reads from the jptr bank of the local memory: the bank address
// is kept one step ahead of the products (the next index when a product is
// taken, the current one otherwise), so the registered bank output always
// holds jptr of the product that arrives next (outside RUN the address is 0,
// ready for the first product of the next iteration). When the product marked last
// has arrived, the controller waits for the adder pipeline to empty (DRAIN)
// and then runs the output sequence (OUT): rows 0..n-1 of S are read one per
// cycle into the ALPHA_V-input accumulator and cleared behind the read. It
// waits until the accumulator has returned all n sums (FLUSH), pulses done
// and is ready for the next iteration. Each state's duration: INIT N_MAX
// cycles, DRAIN up to ALPHA_A, OUT n, FLUSH the accumulator latency.
module f2_ctrl
  import cg_pkg::*;
#(
  parameter int unsigned N_MAX = N_MAX_DEF,
  parameter int unsigned RW    = $clog2(N_MAX),
  parameter int unsigned JAW   = $clog2(GROUPS_DEF)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [RW:0]    n_rows,
  input  logic           dp_valid,
  input  logic           dp_last,
  // jptr bank of the local memory
  output logic [JAW-1:0] jptr_addr,
  input  logic [63:0]    jptr_data,
  // partial summation unit
  output logic           ps_start,
  output logic           ps_valid,
  output logic [RW-1:0]  ps_row,
  input  logic           ps_busy,
  // S array control for the output sequence
  output logic           out_mode,
  output logic [RW-1:0]  out_row,
  output logic           clr_en,
  output logic [RW-1:0]  clr_row,
  // accumulator
  output logic           acc_valid,
  input  logic           acc_out_valid,
  output logic           ready,
  output logic           done
);
  typedef enum logic [2:0] {INIT, RUN, DRAIN, OUT, FLUSH} state_t;
  state_t state;

  logic [RW:0]    row_q;      // sweep counter for INIT and OUT
  logic [RW:0]    got_q;      // sums returned by the accumulator
  logic [JAW-1:0] j_q;        // index of the next dot product

  assign jptr_addr = (state != RUN) ? '0 : dp_valid ? j_q + 1'b1 : j_q;
  assign ps_valid  = (state == RUN) && dp_valid;
  assign ps_row    = jptr_data[RW-1:0];
  assign ps_start  = (state == FLUSH);
  assign out_mode  = (state == OUT);
  assign out_row   = row_q[RW-1:0];
  assign acc_valid = (state == OUT);
  assign clr_en    = (state == INIT) || (state == OUT);
  assign clr_row   = row_q[RW-1:0];
  assign ready     = (state == RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= INIT;
      row_q <= '0;
      got_q <= '0;
      j_q   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        INIT: begin
          row_q <= row_q + 1'b1;
          if (row_q == (RW + 1)'(N_MAX - 1)) begin
            row_q <= '0;
            state <= RUN;
          end
        end
        RUN: if (dp_valid) begin
          j_q <= jptr_addr;
          if (dp_last) state <= DRAIN;
        end
        DRAIN: if (!ps_busy) begin
          row_q <= '0;
          got_q <= '0;
          state <= OUT;
        end
        OUT: begin
          row_q <= row_q + 1'b1;
          if (row_q + 1'b1 == n_rows) state <= FLUSH;
        end
        FLUSH: if (got_q == n_rows) begin
          row_q <= '0;
          j_q   <= '0;
          done  <= 1'b1;
          state <= RUN;
        end
        default: state <= INIT;
      endcase
      if (acc_out_valid) got_q <= got_q + 1'b1;
    end
  end

  // the previous iteration's last sum must have left before a new one starts
  assert property (@(posedge clk) disable iff (!rst_n) dp_valid |-> state == RUN)
    else $error("f2_ctrl: dot product arrived while not ready");

endmodule
