// tb_strong_accum: loads random signed alphas for both modes, then for random
// strong classifiers runs the two accumulation passes with random weak
// decisions and compares y_soft with the sum of alpha * q worked out here.
// Also checks the pass latency (done 18 cycles after start) and `clr`.
module tb_strong_accum;
  import abc_pkg::*;
  logic clk = 0, rst_n = 0, a_we = 0, clr = 0, start = 0, mode_ha = 0, half = 0;
  logic [11:0] a_addr = '0;
  logic [IO_W-1:0] a_wdata = '0;
  logic [N_W-1:0] n = '0;
  logic [N_CMP-1:0] q = '0;
  soft_t y_soft;
  logic busy, done;
  logic signed [7:0] alpha [2][45][256];
  int checks = 0, failures = 0;

  strong_accum dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int md = 0; md < 2; md++)
      for (int nn = 0; nn < 45; nn++)
        for (int g = 0; g < 32; g++) begin
          @(negedge clk);
          a_we = 1; a_addr = {1'(md), 6'(nn), 5'(g)};
          for (int k = 0; k < 8; k++) begin
            alpha[md][nn][8*g+k] = 8'($urandom);
            a_wdata[8*k +: 8] = alpha[md][nn][8*g+k];
          end
        end
    @(negedge clk) a_we = 0;
    for (int t = 0; t < 40; t++) begin
      int exp_sum;
      exp_sum = 0;
      mode_ha = 1'($urandom); n = 6'($urandom_range(44));
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0;
      for (int h = 0; h < 2; h++) begin
        int lat;
        half = 1'(h);
        q = {$urandom, $urandom, $urandom, $urandom};
        for (int w = 0; w < 128; w++) if (q[w]) exp_sum += int'(alpha[mode_ha][n][128*h + w]);
        start = 1;
        @(negedge clk) start = 0;
        lat = 1;
        while (!done && lat < 100) begin @(negedge clk); lat++; end
        checks++;
        if (lat != 18) begin failures++; $display("latency %0d", lat); end
        @(negedge clk);
      end
      checks++;
      if (int'(y_soft) != exp_sum) begin
        failures++;
        $display("n=%0d mode=%0d y=%0d want %0d", n, mode_ha, y_soft, exp_sum);
      end
    end
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    checks++;
    if (y_soft != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
