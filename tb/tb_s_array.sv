// tb_s_array: self-checking test of the partial summation array (64 rows by
// 14 columns for a short run). Random single-element writes, whole-row clears
// and reads are applied against a model; a read returns the whole row in the
// same cycle and reflects every write of earlier cycles. A clear in the same
// cycle as a write wins.
module tb_s_array;
  localparam int N = 64, AV = 14, RW = 6, CW = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [RW-1:0] rd_row = '0, wr_row = '0, clr_row = '0;
  logic [63:0]   rd_data [AV];
  logic          wr_en = 1'b0, clr_en = 1'b0;
  logic [CW-1:0] wr_col = '0;
  logic [63:0]   wr_data = '0;
  logic [63:0]   model [N][AV];
  int checks = 0, failures = 0;

  s_array #(.N_MAX(N), .ALPHA_V(AV)) dut (.clk, .rd_row, .rd_data, .wr_en, .wr_row, .wr_col,
                                          .wr_data, .clr_en, .clr_row);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // clear every row first
    for (int r = 0; r < N; r++) begin
      @(negedge clk); clr_en = 1'b1; clr_row = RW'(r);
      for (int c = 0; c < AV; c++) model[r][c] = '0;
    end
    @(negedge clk); clr_en = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // check the read of the current row against the model
      for (int c = 0; c < AV; c++) begin
        checks++;
        if (rd_data[c] !== model[rd_row][c]) begin
          failures++;
          if (failures < 10) $display("S[%0d][%0d] = %h expected %h", rd_row, c, rd_data[c], model[rd_row][c]);
        end
      end
      // apply new operations for the next edge
      wr_en = ($urandom % 4) != 0; wr_row = RW'($urandom); wr_col = CW'($urandom % AV);
      wr_data = {32'($urandom), 32'($urandom)};
      clr_en = ($urandom % 16) == 0; clr_row = (($urandom % 2) == 0) ? wr_row : RW'($urandom);
      rd_row = RW'($urandom);
      if (clr_en) for (int c = 0; c < AV; c++) model[clr_row][c] = '0;
      if (wr_en && !(clr_en)) model[wr_row][wr_col] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
