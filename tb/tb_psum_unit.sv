// tb_psum_unit: self-checking test of the partial summation unit with the
// reference adder timing (ALPHA_V = 14, ALPHA_A = 14) on a 64-row S array.
// Dot products (small integers, so sums are exact) arrive with row indices
// that are non-decreasing, as jptr is; run lengths vary from 1 to 40, so a
// row often comes back to a column within ALPHA_V products and the unit must
// forward the sum being written. After the pipeline drains (busy low), every
// element S(r, c) must equal the sum of the products j with jptr(j) = r and
// j mod 14 = c, as worked out by the testbench. The test is repeated after a
// new start pulse, which restarts the column count.
module tb_psum_unit;
  localparam int N = 64, AV = 14, AA = 14, RW = 6, CW = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic start = 1'b0, in_valid = 1'b0;
  logic [63:0] in_data = '0;
  logic [RW-1:0] in_row = '0, rd_row, wr_row;
  logic [63:0] rd_data [AV], wr_data;
  logic wr_en, busy, fwd;
  logic [CW-1:0] wr_col;
  logic clr_en = 1'b0;
  logic [RW-1:0] clr_row = '0, chk_row = '0;
  logic chk = 1'b0;
  real sref [N][AV];
  int checks = 0, failures = 0, nfwd = 0;

  psum_unit #(.N_MAX(N), .ALPHA_V(AV), .ALPHA_A(AA)) dut (
    .clk, .rst_n, .start, .in_valid, .in_data, .in_row, .rd_row, .rd_data,
    .wr_en, .wr_row, .wr_col, .wr_data, .busy, .fwd);

  s_array #(.N_MAX(N), .ALPHA_V(AV)) u_s (
    .clk, .rd_row(chk ? chk_row : rd_row), .rd_data, .wr_en, .wr_row, .wr_col, .wr_data,
    .clr_en, .clr_row);

  always @(posedge clk) if (fwd) nfwd++;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      int j, row, left;
      // clear S and the model
      for (int r = 0; r < N; r++) begin
        @(negedge clk); clr_en = 1'b1; clr_row = RW'(r);
        for (int c = 0; c < AV; c++) sref[r][c] = 0.0;
      end
      @(negedge clk); clr_en = 1'b0; start = 1'b1;
      @(negedge clk); start = 1'b0;
      j = 0; row = 0; left = 1 + int'($urandom % 40);
      while (row < N) begin
        @(negedge clk);
        if (($urandom % 8) == 0 && pass == 1) begin
          in_valid = 1'b0;                       // occasional bubble
        end else begin
          real d;
          d = real'(int'($urandom % 2001) - 1000);
          in_valid = 1'b1; in_data = $realtobits(d); in_row = RW'(row);
          sref[row][j % AV] += d;
          j++;
          left--;
          if (left == 0) begin
            row += 1 + int'($urandom % 2);       // some rows stay empty
            left = 1 + int'($urandom % 40);
          end
        end
      end
      @(negedge clk); in_valid = 1'b0;
      while (busy) @(negedge clk);
      chk = 1'b1;
      for (int r = 0; r < N; r++) begin
        chk_row = RW'(r);
        #1;
        for (int c = 0; c < AV; c++) begin
          checks++;
          if (rd_data[c] !== $realtobits(sref[r][c])) begin
            failures++;
            if (failures < 10) $display("pass %0d S[%0d][%0d] = %f expected %f", pass, r, c,
                                        $bitstoreal(rd_data[c]), sref[r][c]);
          end
        end
      end
      chk = 1'b0;
    end
    checks++;
    if (nfwd == 0) begin failures++; $display("forwarding never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
