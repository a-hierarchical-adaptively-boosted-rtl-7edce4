// tb_sram_bca: random 64-bit slice writes through the column mux, read back
// with one cycle latency against a reference copy, and the four-row
// functional-read view of random row groups.
module tb_sram_bca;
  logic clk = 0, en = 0, we = 0;
  logic [8:0] row = '0;
  logic [1:0] col_sel = '0;
  logic [63:0] wdata = '0, rdata;
  logic [6:0] fr_grp = '0;
  logic [255:0] grp_bits [4];
  logic [255:0] ref_mem [512];
  int checks = 0, failures = 0;

  sram_bca dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every row
    for (int r = 0; r < 512; r++)
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        en = 1; we = 1; row = 9'(r); col_sel = 2'(c);
        wdata = {$urandom, $urandom};
        ref_mem[r][64*c +: 64] = wdata;
      end
    // random reads
    for (int t = 0; t < 500; t++) begin
      int r, c;
      r = $urandom_range(511); c = $urandom_range(3);
      @(negedge clk);
      en = 1; we = 0; row = 9'(r); col_sel = 2'(c);
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata !== ref_mem[r][64*c +: 64]) begin
        failures++;
        if (failures < 5) $display("read row %0d col %0d mismatch", r, c);
      end
    end
    // functional-read view
    for (int t = 0; t < 128; t++) begin
      fr_grp = 7'(t);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (grp_bits[k] !== ref_mem[4*t + k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
