// tb_imc_compare: places random thresholds T in the four 6T rows and random
// pixels X (complemented) in the four replica rows, plays the precharge,
// binary-weighted wordline pulses, charge sharing and comparator enable, and
// checks every comparator: q = 1 exactly when T + offset > X. Cases with
// T = X and X = T + offset probe the decision boundary.
module tb_imc_compare;
  import abc_pkg::*;
  logic clk = 0, rst_n = 0, pre = 0, cs_en = 0, comp_en = 0;
  logic [3:0] wl = '0, rwl = '0;
  logic [COLS-1:0] t_bits [4], r_bits [4];
  logic signed [5:0] offset [N_CMP];
  logic [N_CMP-1:0] q;
  pix_t tv [N_CMP], xv [N_CMP];
  int checks = 0, failures = 0;

  imc_compare dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      for (int w = 0; w < 128; w++) begin
        offset[w] = (t < 20) ? 6'sd0 : 6'($urandom_range(40) - 20);
        tv[w] = 8'($urandom);
        case ($urandom_range(3))
          0: xv[w] = tv[w];
          1: xv[w] = 8'(int'(tv[w]) + int'(offset[w]));
          default: xv[w] = 8'($urandom);
        endcase
      end
      for (int r = 0; r < 4; r++)
        for (int w = 0; w < 128; w++) begin
          t_bits[r][2*w]   = tv[w][4+r];
          t_bits[r][2*w+1] = tv[w][r];
          r_bits[r][2*w]   = ~xv[w][4+r];
          r_bits[r][2*w+1] = ~xv[w][r];
        end
      @(negedge clk) pre = 1;
      @(negedge clk) pre = 0;
      for (int c = 0; c < 8; c++) begin
        for (int r = 0; r < 4; r++) wl[r] = (c < (1 << r));
        rwl = wl;
        @(negedge clk);
      end
      wl = '0; rwl = '0;
      cs_en = 1;
      @(negedge clk) cs_en = 0; comp_en = 1;
      @(negedge clk) comp_en = 0;
      for (int w = 0; w < 128; w++) begin
        logic exp_q;
        exp_q = (int'(tv[w]) + int'(offset[w])) > int'(xv[w]);
        checks++;
        if (q[w] !== exp_q) begin
          failures++;
          if (failures < 5) $display("w=%0d T=%0d X=%0d ofs=%0d q=%0d", w, tv[w], xv[w], offset[w], q[w]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
