// tb_abc_sequencer: drives the mode sequencer with models of the comparison
// and accumulation handshakes. The model reports low confidence for every
// third strong classifier and a decision that depends on the mode, so the
// test can tell which pass was voted. Checks, for LP, HA and hybrid batches:
// the row groups and crossbar enable of each comparison, two comparisons per
// pass, the switch to HA only for low-confidence LP decisions, the voted
// decisions and the event counters.
module tb_abc_sequencer;
  import abc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  mode_e mode = MODE_LP;
  logic [N_W-1:0] n_base = '0, n_count = '0;
  logic cmp_start, cmp_ha, acc_clr, acc_start, cur_ha, half, vote_en, busy, done;
  logic [GRP_W-1:0] p_grp, t_grp;
  logic cmp_done = 0, acc_done = 0;
  logic [N_W-1:0] cur_n;
  logic confident, y_bin;
  logic [15:0] cnt_lp_cmp, cnt_ha_cmp, cnt_switch, cnt_confident;
  int checks = 0, failures = 0;
  int n_cmp_lp, n_cmp_ha, n_votes;
  int cdly = 0, adly = 0;

  abc_sequencer dut (.*);
  always #5 clk = ~clk;

  assign confident = (cur_n % 3) != 0;
  assign y_bin     = cur_ha ? cur_n[0] : ~cur_n[0];

  always_ff @(posedge clk) begin
    cmp_done <= 1'b0;
    acc_done <= 1'b0;
    if (cmp_start) cdly <= 4;
    else if (cdly == 1) begin cdly <= 0; cmp_done <= 1'b1; end
    else if (cdly > 1) cdly <= cdly - 1;
    if (acc_start) adly <= 3;
    else if (adly == 1) begin adly <= 0; acc_done <= 1'b1; end
    else if (adly > 1) adly <= adly - 1;
  end

  // check each comparison request and each vote
  always @(negedge clk) begin
    if (cmp_start) begin
      int s;
      s = int'(cur_n) - int'(n_base);
      checks++;
      if (int'(t_grp) != 6*s + (cmp_ha ? 2 : 4) + int'(half) || int'(p_grp) != 6*s + int'(half))
        failures++;
      if (cmp_ha) n_cmp_ha++; else n_cmp_lp++;
    end
    if (vote_en) begin
      logic use_ha;
      use_ha = (mode == MODE_HA) || (mode == MODE_HYBRID && (cur_n % 3) == 0);
      checks++;
      if (y_bin !== (use_ha ? cur_n[0] : ~cur_n[0])) failures++;
      n_votes++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic batch(input mode_e m, input int nb, input int nc);
    int low;
    low = 0;
    for (int k = nb; k < nb + nc; k++) if (k % 3 == 0) low++;
    n_cmp_lp = 0; n_cmp_ha = 0; n_votes = 0;
    @(negedge clk);
    mode = m; n_base = 6'(nb); n_count = 6'(nc); start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    checks++;
    case (m)
      MODE_LP: if (n_cmp_lp != 2*nc || n_cmp_ha != 0) failures++;
      MODE_HA: if (n_cmp_ha != 2*nc || n_cmp_lp != 0) failures++;
      default: if (n_cmp_lp != 2*nc || n_cmp_ha != 2*low) failures++;
    endcase
    checks++;
    if (n_votes != nc) failures++;
    checks++;
    if (int'(cnt_lp_cmp) != n_cmp_lp || int'(cnt_ha_cmp) != n_cmp_ha) failures++;
    if (m == MODE_HYBRID) begin
      checks++;
      if (int'(cnt_switch) != low || int'(cnt_confident) != nc - low) failures++;
    end
    $display("mode %0d: lp %0d ha %0d votes %0d switches %0d", m, n_cmp_lp, n_cmp_ha, n_votes, cnt_switch);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    batch(MODE_LP, 0, 21);
    batch(MODE_HA, 21, 21);
    batch(MODE_HYBRID, 42, 3);
    batch(MODE_HYBRID, 0, 21);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
