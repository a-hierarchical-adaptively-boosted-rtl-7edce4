// tb_mrwl_driver: fires the wordline driver at T0 = 1 and T0 = 3 and measures
// each pulse: WL_r and RWL_r must rise together and stay high 2^r * T0
// cycles; `done` must follow the longest pulse; the group is latched.
module tb_mrwl_driver;
  logic clk = 0, rst_n = 0;
  logic fire1 = 0, fire3 = 0;
  logic [6:0] grp = '0;
  logic [6:0] gq1, gq3;
  logic [3:0] wl1, rwl1, wl3, rwl3;
  logic busy1, busy3, done1, done3;
  int checks = 0, failures = 0;

  mrwl_driver #(.T0(1)) d1 (.clk, .rst_n, .fire(fire1), .grp, .grp_q(gq1), .wl(wl1), .rwl(rwl1), .busy(busy1), .done(done1));
  mrwl_driver #(.T0(3)) d3 (.clk, .rst_n, .fire(fire3), .grp, .grp_q(gq3), .wl(wl3), .rwl(rwl3), .busy(busy3), .done(done3));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int t0);
    int hi [4];
    int done_at, first;
    for (int r = 0; r < 4; r++) hi[r] = 0;
    done_at = -1; first = -1;
    grp = 7'($urandom);
    @(negedge clk);
    if (t0 == 1) fire1 = 1; else fire3 = 1;
    @(negedge clk);
    fire1 = 0; fire3 = 0;
    for (int c = 0; c < 40; c++) begin
      logic [3:0] w, rw;
      logic dn;
      w  = (t0 == 1) ? wl1 : wl3;
      rw = (t0 == 1) ? rwl1 : rwl3;
      dn = (t0 == 1) ? done1 : done3;
      checks++;
      if (w !== rw) failures++;
      if (w != 0 && first < 0) first = c;
      if (first >= 0 && c == first) begin
        checks++;
        if (w !== 4'hf) failures++;   // all pulses start together
      end
      for (int r = 0; r < 4; r++) if (w[r]) hi[r]++;
      if (dn && done_at < 0) done_at = c;
      @(negedge clk);
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (hi[r] != (t0 << r)) begin
        failures++;
        $display("T0=%0d WL%0d high %0d cycles", t0, r, hi[r]);
      end
    end
    checks++;
    if (done_at != first + 8*t0) begin failures++; $display("done at %0d first %0d", done_at, first); end
    checks++;
    if (((t0 == 1) ? gq1 : gq3) !== grp) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++) begin run(1); run(3); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
