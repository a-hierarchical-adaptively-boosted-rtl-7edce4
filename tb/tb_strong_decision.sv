// tb_strong_decision: random and boundary soft decisions, thresholds and margin
// thresholds; checks the binary decision, |y - T^| and the confidence flag.
module tb_strong_decision;
  import abc_pkg::*;
  soft_t y_soft, t_hat;
  logic [SOFT_W-1:0] t_h;
  logic y_bin, confident;
  logic [SOFT_W:0] sdm;
  int checks = 0, failures = 0;

  strong_decision dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int y, th, m, d;
      y  = $urandom_range(60000) - 30000;
      th = (t % 3 == 0) ? y + $urandom_range(6) - 3 : $urandom_range(60000) - 30000;
      m  = $urandom_range(5);
      y_soft = soft_t'(y); t_hat = soft_t'(th); t_h = SOFT_W'(m);
      #1;
      d = y - th;
      checks += 3;
      if (y_bin !== (d >= 0)) failures++;
      if (int'(sdm) != ((d < 0) ? -d : d)) failures++;
      if (confident !== (((d < 0) ? -d : d) > m)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
