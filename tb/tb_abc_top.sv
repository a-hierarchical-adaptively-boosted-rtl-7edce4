// tb_abc_top: end-to-end test of the classifier at its default size (512-row
// array, 45 strong classifiers of 256 weak classifiers, 256-pixel image).
//
// Random pixel indices, thresholds, alphas and an image are generated here,
// and a reference model computes every weak decision (q = T > X), soft
// decision, strong decision and the plurality vote independently of the RTL.
// Strong thresholds are placed close to the soft decisions of some classifiers
// so that the hybrid mode must fall back to HA for them (margin threshold 2).
// The image is classified in LP, HA and hybrid mode, each as three batches
// (21 + 21 + 3 strong classifiers, the array being reloaded between batches).
// Then random comparator offsets are switched on: a hybrid run shows wrong
// decisions, every threshold group is calibrated, and a final hybrid run must
// again match the ideal reference. Checked: every strong decision, the final
// class, vote counts, 90 comparison cycles per image and mode pass, the hybrid
// switch count, host read-back of the array. Each mechanism (LP pass, HA
// crossbar pass, hybrid switch, confident LP decision, batch reload,
// calibration, offset-induced error) must occur at least once.
module tb_abc_top;
  import abc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mem_en = 0, mem_we = 0;
  logic [8:0] mem_row = '0;
  logic [1:0] mem_col = '0;
  logic [63:0] mem_wdata = '0, mem_rdata;
  logic pix_we = 0;
  logic [4:0] pix_addr = '0;
  logic [63:0] pix_wdata = '0;
  logic alpha_we = 0;
  logic [11:0] alpha_addr = '0;
  logic [63:0] alpha_wdata = '0;
  logic that_we = 0, that_ha = 0;
  logic [5:0] that_n = '0;
  logic [17:0] that_data = '0;
  logic [1:0] mode = 2'd0;
  logic [17:0] t_h = 18'd2;
  logic start = 0, first_batch = 0;
  logic [5:0] n_base = '0, n_count = '0;
  logic busy, done, strong_vld, strong_y, cal_busy, cal_done;
  logic [18:0] strong_sdm;
  logic [3:0] y_hat;
  logic [5:0] votes [10];
  logic [5:0] strong_n;
  logic [15:0] cnt_lp_cmp, cnt_ha_cmp, cnt_switch, cnt_confident;
  logic cal_start = 0;
  logic [6:0] cal_grp = '0;
  logic signed [5:0] cmp_offset [128];

  abc_top dut (.*);
  always #5 clk = ~clk;

  // ---------------- reference data ----------------
  pix_t X [256];
  logic [5:0] P [45][256];
  pix_t T [2][45][256];          // [0]=LP thresholds, [1]=HA thresholds
  logic signed [7:0] A [2][45][256];
  int   Y [2][45];               // soft decisions
  int   TH [2][45];              // strong thresholds
  logic ref_y [45];              // expected voted decision (hybrid / per mode)
  int   checks = 0, failures = 0;
  int   ev_lp = 0, ev_ha = 0, ev_switch = 0, ev_conf = 0, ev_reload = 0, ev_cal = 0, ev_offset_err = 0;
  logic got_y [45];
  logic got_v [45];

  function automatic pix_t pix_for(int md, int n, int m);
    int h, w;
    h = m / 128; w = m % 128;
    if (md == 0) return X[4*(h*32 + w%32) + w/32];
    return X[4*int'(P[n][m]) + w/32];
  endfunction

  function automatic int soft_ref(int md, int n);
    int s;
    s = 0;
    for (int m = 0; m < 256; m++) if (T[md][n][m] > pix_for(md, n, m)) s += int'(A[md][n][m]);
    return s;
  endfunction

  always @(posedge clk) if (strong_vld) begin
    got_y[strong_n] = strong_y;
    got_v[strong_n] = 1'b1;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host tasks ----------------
  task automatic mem_write(int row, int col, logic [63:0] d);
    @(negedge clk);
    mem_en = 1; mem_we = 1; mem_row = 9'(row); mem_col = 2'(col); mem_wdata = d;
    @(negedge clk);
    mem_en = 0; mem_we = 0;
  endtask

  task automatic load_group(int g, pix_t words [128]);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        pix_t ws [32];
        for (int j = 0; j < 32; j++) ws[j] = words[32*c + j];
        mem_write(4*g + r, c, pack_slice(ws, 2'(r)));
      end
  endtask

  task automatic load_batch(int nb, int nc);
    for (int s = 0; s < nc; s++)
      for (int h = 0; h < 2; h++) begin
        pix_t wp [128], wh [128], wl [128];
        for (int w = 0; w < 128; w++) begin
          wp[w] = {2'b00, P[nb+s][128*h + w]};
          wh[w] = T[1][nb+s][128*h + w];
          wl[w] = T[0][nb+s][128*h + w];
        end
        load_group(6*s + OFS_P + h, wp);
        load_group(6*s + OFS_THA + h, wh);
        load_group(6*s + OFS_TLP + h, wl);
      end
  endtask

  task automatic calibrate_batch(int nc);
    for (int s = 0; s < nc; s++)
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        cal_grp = 7'(6*s + 2 + k); cal_start = 1;
        @(negedge clk) cal_start = 0;
        while (cal_busy) @(negedge clk);
        ev_cal++;
      end
  endtask

  // Runs one image in mode md (calibrating each batch when `calib`); returns
  // the number of strong decisions that differ from the reference. Checks the
  // comparison and switch counts against the reference when `strict`.
  task automatic run_image(int md, bit calib, bit strict, output int wrong);
    int lp_total, ha_total, sw_total, run_cycles;
    int nb [3] = '{0, 21, 42};
    int nc [3] = '{21, 21, 3};
    lp_total = 0; ha_total = 0; sw_total = 0; wrong = 0; run_cycles = 0;
    for (int n = 0; n < 45; n++) got_v[n] = 1'b0;
    for (int b = 0; b < 3; b++) begin
      load_batch(nb[b], nc[b]);
      if (b > 0) ev_reload++;
      if (calib) calibrate_batch(nc[b]);
      @(negedge clk);
      mode = 2'(md); n_base = 6'(nb[b]); n_count = 6'(nc[b]); first_batch = (b == 0); start = 1;
      @(negedge clk) start = 0;
      run_cycles++;
      while (!done) begin @(negedge clk); run_cycles++; end
      @(negedge clk);
      lp_total += int'(cnt_lp_cmp); ha_total += int'(cnt_ha_cmp); sw_total += int'(cnt_switch);
      if (md == 2) ev_conf += int'(cnt_confident);
    end
    for (int n = 0; n < 45; n++) begin
      logic e;
      e = (md == 0) ? (Y[0][n] >= TH[0][n]) :
          (md == 1) ? (Y[1][n] >= TH[1][n]) : ref_y[n];
      if (!got_v[n] || got_y[n] !== e) wrong++;
    end
    ev_lp += lp_total; ev_ha += ha_total; ev_switch += sw_total;
    $display("mode %0d: LP comparisons %0d, HA comparisons %0d, switches %0d, wrong %0d, y_hat %0d, classify cycles %0d",
             md, lp_total, ha_total, sw_total, wrong, y_hat, run_cycles);
    if (strict) checks++;
    if (strict) case (md)
      0: if (lp_total != 90 || ha_total != 0) failures++;
      1: if (ha_total != 90 || lp_total != 0) failures++;
      default: begin
        int low;
        low = 0;
        for (int n = 0; n < 45; n++) begin
          int d;
          d = Y[0][n] - TH[0][n];
          if (!((d < 0 ? -d : d) > 2)) low++;
        end
        if (lp_total != 90 || ha_total != 2*low || sw_total != low) failures++;
      end
    endcase
  endtask

  task automatic check_vote(int md);
    int cnt [10];
    int best, k;
    for (int c = 0; c < 10; c++) cnt[c] = 0;
    k = 0;
    for (int a = 0; a < 10; a++)
      for (int b = a + 1; b < 10; b++) begin
        logic e;
        e = (md == 0) ? (Y[0][k] >= TH[0][k]) : (md == 1) ? (Y[1][k] >= TH[1][k]) : ref_y[k];
        if (e) cnt[a]++; else cnt[b]++;
        k++;
      end
    best = 0;
    for (int c = 1; c < 10; c++) if (cnt[c] > cnt[best]) best = c;
    for (int c = 0; c < 10; c++) begin
      checks++;
      if (int'(votes[c]) != cnt[c]) failures++;
    end
    checks++;
    if (int'(y_hat) != best) begin failures++; $display("y_hat %0d want %0d", y_hat, best); end
  endtask

  initial begin
    int wrong;
    for (int w = 0; w < 128; w++) cmp_offset[w] = '0;
    for (int i = 0; i < 256; i++) X[i] = 8'($urandom);
    for (int n = 0; n < 45; n++)
      for (int m = 0; m < 256; m++) begin
        P[n][m] = 6'($urandom);
        T[0][n][m] = 8'(20 + $urandom_range(215));
        T[1][n][m] = 8'(20 + $urandom_range(215));
        A[0][n][m] = 8'($urandom);
        A[1][n][m] = 8'($urandom);
      end
    for (int n = 0; n < 45; n++) begin
      Y[0][n] = soft_ref(0, n);
      Y[1][n] = soft_ref(1, n);
      TH[1][n] = Y[1][n] + $urandom_range(400) - 200;
      if (n % 3 == 0) TH[0][n] = Y[0][n] + $urandom_range(2) - 1;        // low margin
      else            TH[0][n] = Y[0][n] + ($urandom_range(1) ? 1 : -1) * (5 + $urandom_range(300));
      if (TH[0][n] == Y[0][n] + 5 || TH[0][n] == Y[0][n] - 5) TH[0][n]++;
      begin
        int d;
        d = Y[0][n] - TH[0][n];
        ref_y[n] = ((d < 0 ? -d : d) > 2) ? (Y[0][n] >= TH[0][n]) : (Y[1][n] >= TH[1][n]);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // image
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      pix_we = 1; pix_addr = 5'(a);
      for (int k = 0; k < 8; k++) pix_wdata[8*k +: 8] = X[8*a + k];
    end
    @(negedge clk) pix_we = 0;
    // alphas and strong thresholds
    for (int md = 0; md < 2; md++)
      for (int n = 0; n < 45; n++) begin
        for (int g = 0; g < 32; g++) begin
          @(negedge clk);
          alpha_we = 1; alpha_addr = {1'(md), 6'(n), 5'(g)};
          for (int k = 0; k < 8; k++) alpha_wdata[8*k +: 8] = A[md][n][8*g + k];
        end
        @(negedge clk);
        alpha_we = 0;
        that_we = 1; that_ha = 1'(md); that_n = 6'(n); that_data = 18'(TH[md][n]);
        @(negedge clk) that_we = 0;
      end
    // host read-back of the first slot
    load_batch(0, 1);
    for (int r = 0; r < 4; r++) begin
      pix_t ws [32];
      @(negedge clk);
      mem_en = 1; mem_we = 0; mem_row = 9'(4*OFS_TLP + r); mem_col = 2'd1;
      @(negedge clk);
      mem_en = 0;
      for (int j = 0; j < 32; j++) ws[j] = T[0][0][32 + j];
      checks++;
      if (mem_rdata !== pack_slice(ws, 2'(r))) failures++;
    end

    for (int md = 0; md < 3; md++) begin
      run_image(md, 1'b0, 1'b1, wrong);
      checks++;
      if (wrong != 0) failures++;
      check_vote(md);
    end
    // comparator offsets: errors without calibration, none after it
    for (int w = 0; w < 128; w++) cmp_offset[w] = 6'($urandom_range(30) - 15);
    run_image(2, 1'b0, 1'b0, wrong);
    ev_offset_err = wrong;
    run_image(2, 1'b1, 1'b1, wrong);
    checks++;
    if (wrong != 0) failures++;
    check_vote(2);

    $display("events: LP cmp %0d, HA cmp %0d, switch %0d, confident %0d, reload %0d, calibration %0d, offset errors %0d",
             ev_lp, ev_ha, ev_switch, ev_conf, ev_reload, ev_cal, ev_offset_err);
    checks += 7;
    if (ev_lp == 0) failures++;
    if (ev_ha == 0) failures++;
    if (ev_switch == 0) failures++;
    if (ev_conf == 0) failures++;
    if (ev_reload == 0) failures++;
    if (ev_cal == 0) failures++;
    if (ev_offset_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
