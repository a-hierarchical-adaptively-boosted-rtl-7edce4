// tb_replica_bca: writes random pixels row by row and checks the complemented
// bit placement: row r, column 2w holds ~x[4+r], column 2w+1 holds ~x[r];
// rows not strobed keep their contents.
module tb_replica_bca;
  import abc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] wwl = '0;
  pix_t wr_pix [N_CMP];
  logic [COLS-1:0] cells [4];
  pix_t x_row [4][N_CMP];
  int checks = 0, failures = 0;

  replica_bca dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 128; w++) wr_pix[w] = '0;
    repeat (2) @(posedge clk);
    for (int r = 0; r < 4; r++) for (int w = 0; w < 128; w++) x_row[r][w] = 8'h00;
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int r = 3; r >= 0; r--) begin
        if ($urandom_range(3) == 0) continue;   // leave this row unchanged
        @(negedge clk);
        for (int w = 0; w < 128; w++) begin wr_pix[w] = 8'($urandom); x_row[r][w] = wr_pix[w]; end
        wwl = 4'b0001 << r;
        @(negedge clk);
        wwl = '0;
        for (int w = 0; w < 128; w++) wr_pix[w] = 8'($urandom);   // must not be written
      end
      @(negedge clk);
      for (int r = 0; r < 4; r++)
        for (int w = 0; w < 128; w++) begin
          checks++;
          if (cells[r][2*w] !== ~x_row[r][w][4+r] || cells[r][2*w+1] !== ~x_row[r][w][r]) begin
            failures++;
            if (failures < 5) $display("row %0d word %0d mismatch", r, w);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
