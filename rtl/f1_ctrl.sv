// f1_ctrl: controller of the first FPGA.
//
// Input sequence: while idle, each valid p_in word is stored at the next
// address of the p copies (address 0 after reset and after every iteration).
// Execute sequence: a start pulse makes the controller read entry n of the
// row-pointer RAM, the number G of k-groups of the k-aligned matrix (row 0
// is assumed to start at k-group 0). It then reads k-group g = 0..G-1 from
// the local memory, one per cycle: the K value banks and the col bank all at
// address g. The read data of a cycle (one cycle after the address) is
// turned into the K p-copy addresses by unpacking the col word, and the
// values are registered for one cycle, so that each a_ij meets its p_j at the
// dot product inputs two cycles after the address; grp_valid/grp_last mark
// those cycles. Output sequence: the controller counts the q_i returned by
// the second FPGA and pulses done after the n-th; the q stream itself is
// forwarded by the enclosing FPGA.
module f1_ctrl
  import cg_pkg::*;
#(
  parameter int unsigned N_MAX = N_MAX_DEF,
  parameter int unsigned RW    = $clog2(N_MAX),
  parameter int unsigned PAW   = $clog2(N_MAX + 1),
  parameter int unsigned GAW   = $clog2(GROUPS_DEF)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RW:0]      n_rows,
  input  logic             start,
  input  logic             p_in_valid,
  output logic             p_we,
  output logic [RW-1:0]    p_waddr,
  output logic [PAW-1:0]   ptr_raddr,
  input  logic [PTR_W-1:0] ptr_rdata,
  output logic [GAW-1:0]   grp_addr,      // local memory address of the k-group
  output logic             grp_valid,     // dot-product inputs valid this cycle
  output logic             grp_last,
  input  logic             q_valid,
  output logic             busy,
  output logic             done
);
  typedef enum logic [1:0] {IDLE, PTR, STREAM, WAITQ} state_t;
  state_t state;

  logic [RW-1:0]    pa_q;
  logic [PTR_W-1:0] g_q, ng_q;
  logic [RW:0]      nq_q;
  logic             ptr_wait_q;
  logic [1:0]       v_q, l_q;       // issue -> data -> dot product inputs

  assign p_we      = (state == IDLE) && p_in_valid;
  assign p_waddr   = pa_q;
  assign ptr_raddr = PAW'(n_rows);
  assign grp_addr  = g_q[GAW-1:0];
  assign grp_valid = v_q[1];
  assign grp_last  = l_q[1];
  assign busy      = (state != IDLE);

  wire issue = (state == STREAM);
  wire last  = issue && (g_q + 1'b1 == ng_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      pa_q       <= '0;
      g_q        <= '0;
      ng_q       <= '0;
      nq_q       <= '0;
      ptr_wait_q <= 1'b0;
      v_q        <= '0;
      l_q        <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      v_q  <= {v_q[0], issue};
      l_q  <= {l_q[0], last};
      unique case (state)
        IDLE: begin
          if (p_we) pa_q <= pa_q + 1'b1;
          if (start) begin
            ptr_wait_q <= 1'b0;
            state      <= PTR;
          end
        end
        PTR: begin
          // ptr_raddr is presented in the first cycle, data is there in the second
          ptr_wait_q <= 1'b1;
          if (ptr_wait_q) begin
            ng_q  <= ptr_rdata;
            g_q   <= '0;
            nq_q  <= '0;
            state <= (ptr_rdata == '0) ? WAITQ : STREAM;
          end
        end
        STREAM: begin
          g_q <= g_q + 1'b1;
          if (last) state <= WAITQ;
        end
        WAITQ: begin
          if (q_valid) nq_q <= nq_q + 1'b1;
          if (q_valid && nq_q + 1'b1 == n_rows) begin
            pa_q  <= '0;
            done  <= 1'b1;
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (state == PTR && ptr_wait_q) |-> ptr_rdata != '0)
    else $error("f1_ctrl: matrix with no k-groups");

endmodule
