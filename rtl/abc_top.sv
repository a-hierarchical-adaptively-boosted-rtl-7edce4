// abc_top: hierarchical AdaBoost classifier computed in a 6T SRAM.
//
// A 10-class decision is the plurality vote of 45 one-versus-one strong
// classifiers; each strong classifier sums alpha-weighted decisions of 256 weak
// classifiers, and a weak classifier is the comparison of one pixel with a
// stored 8-bit threshold. The comparisons run inside the memory: 128 at a time,
// the thresholds are read from the bit-cell array by a multi-row functional
// read while the pixels sit in a replica array on the same bitlines.
//
// Datapath: dss_input_buffer (256 pixels in 4 sub-sampled banks) ->
// crossbar_switch (4 x 64x32 crossbars, or bypass) -> replica_bca -> bitlines
// shared with sram_bca, driven by mrwl_driver -> imc_compare (128 comparators)
// -> strong_accum (alpha * q) -> strong_decision -> plurality_voter.
// Control: abc_sequencer walks the strong classifiers in LP, HA or hybrid mode;
// imc_controller sequences each comparison; fg_calibrator recalibrates a row
// group of thresholds against the comparators' offsets.
//
// Host interface (all synchronous to clk):
//  - mem_*: 64-bit normal read/write port of the array (row, 4:1 mux select);
//    read data one cycle later; only while the classifier is idle.
//  - pix_*: 8 pixels per write into the input buffer.
//  - alpha_*: 8 alphas per write (address {mode_ha, n, m/8}).
//  - that_*: strong-classifier threshold T^ of (mode_ha, n).
//  - start with mode, n_base, n_count runs one batch of strong classifiers
//    held in slots 0.. of the array (6 row groups = 24 rows per slot:
//    pixel indices, HA thresholds, LP thresholds, each as two groups);
//    first_batch clears the vote counts. The 512-row array holds 21 slots, so
//    a full image takes batches of at most 21 with reloads between them.
//  - strong_vld/strong_n/strong_y/strong_sdm report each voted strong decision
//    and its soft decision margin.
//  - cal_start/cal_grp calibrate one threshold row group; cal_done pulses.
//  - cmp_offset: input-referred offset of each analog comparator, an input of
//    the behavioural comparator model (0 for an ideal array).
// Outputs y_hat/votes hold the running vote; done pulses at the end of a batch.
module abc_top
  import abc_pkg::*;
#(
  parameter int unsigned ROWS = 512,
  parameter int unsigned T0   = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // normal memory port
  input  logic                  mem_en,
  input  logic                  mem_we,
  input  logic [$clog2(ROWS)-1:0] mem_row,
  input  logic [1:0]            mem_col,
  input  logic [IO_W-1:0]       mem_wdata,
  output logic [IO_W-1:0]       mem_rdata,
  // pixels
  input  logic                  pix_we,
  input  logic [4:0]            pix_addr,
  input  logic [IO_W-1:0]       pix_wdata,
  // alphas and strong thresholds
  input  logic                  alpha_we,
  input  logic [11:0]           alpha_addr,
  input  logic [IO_W-1:0]       alpha_wdata,
  input  logic                  that_we,
  input  logic                  that_ha,
  input  logic [N_W-1:0]        that_n,
  input  logic [SOFT_W-1:0]     that_data,
  // run control
  input  logic [1:0]            mode,
  input  logic [SOFT_W-1:0]     t_h,
  input  logic                  start,
  input  logic                  first_batch,
  input  logic [N_W-1:0]        n_base,
  input  logic [N_W-1:0]        n_count,
  output logic                  busy,
  output logic                  done,
  output logic [3:0]            y_hat,
  output logic [5:0]            votes [N_CLASS],
  output logic                  strong_vld,
  output logic [N_W-1:0]        strong_n,
  output logic                  strong_y,
  output logic [SOFT_W:0]       strong_sdm,
  output logic [15:0]           cnt_lp_cmp,
  output logic [15:0]           cnt_ha_cmp,
  output logic [15:0]           cnt_switch,
  output logic [15:0]           cnt_confident,
  // calibration
  input  logic                  cal_start,
  input  logic [GRP_W-1:0]      cal_grp,
  output logic                  cal_busy,
  output logic                  cal_done,
  // analog model input
  input  logic signed [5:0]     cmp_offset [N_CMP]
);
  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned GW = RW - 2;

  // ---------------- input buffer and crossbar switch ----------------
  pix_t bank_pix [N_BANK][BANK_PIX];
  pix_t cmp_pix  [N_CMP];
  pix_t rep_pix  [N_CMP];

  dss_input_buffer u_buf (
    .clk, .rst_n, .wr_en(pix_we), .wr_addr(pix_addr), .wr_data(pix_wdata), .bank_pix(bank_pix)
  );

  logic                 cb_en;
  logic [IDX_W-1:0]     p_idx [N_CMP];
  logic                 half;

  crossbar_switch u_xsw (
    .bank_pix(bank_pix), .cb_en(cb_en), .half(half), .p_idx(p_idx), .cmp_pix(cmp_pix)
  );

  // ---------------- control blocks ----------------
  logic                 seq_cmp_start, seq_cmp_ha, cmp_done, cmp_busy;
  logic [GRP_W-1:0]     seq_p_grp, seq_t_grp;
  logic                 acc_clr, acc_start, acc_done, acc_busy, cur_ha;
  logic [N_W-1:0]       cur_n;
  logic                 confident, y_bin, vote_en;
  logic                 cal_cmp_start, cal_active;
  pix_t                 ramp;

  logic                 ctl_mem_en;
  logic [GRP_W+1:0]     ctl_mem_row;
  logic [1:0]           ctl_mem_col;
  logic                 cal_mem_en, cal_mem_we;
  logic [GRP_W+1:0]     cal_mem_row;
  logic [1:0]           cal_mem_col;
  logic [IO_W-1:0]      cal_mem_wdata;

  logic [3:0]           wwl, wl, rwl;
  logic                 fire, wl_done, wl_busy, pre, cs_en, comp_en;
  logic [GRP_W-1:0]     fire_grp, wl_grp;
  logic [N_CMP-1:0]     q;

  logic [GRP_W-1:0] cal_grp_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    cal_grp_q <= '0;
    else if (cal_start && !cal_busy && !busy) cal_grp_q <= cal_grp;
  end

  abc_sequencer u_seq (
    .clk, .rst_n, .start(start && !cal_busy), .mode(mode_e'(mode)), .n_base, .n_count,
    .cmp_start(seq_cmp_start), .cmp_ha(seq_cmp_ha), .p_grp(seq_p_grp), .t_grp(seq_t_grp),
    .cmp_done(cmp_done),
    .acc_clr(acc_clr), .acc_start(acc_start), .cur_ha(cur_ha), .cur_n(cur_n), .half(half),
    .acc_done(acc_done), .confident(confident),
    .vote_en(vote_en), .busy(busy), .done(done),
    .cnt_lp_cmp, .cnt_ha_cmp, .cnt_switch, .cnt_confident
  );

  imc_controller u_ctl (
    .clk, .rst_n,
    .start(cal_active ? cal_cmp_start : seq_cmp_start),
    .ha(cal_active ? 1'b0 : seq_cmp_ha),
    .p_grp(seq_p_grp),
    .t_grp(cal_active ? cal_grp_q : seq_t_grp),
    .mem_en(ctl_mem_en), .mem_row(ctl_mem_row), .mem_col(ctl_mem_col), .mem_rdata(mem_rdata),
    .p_idx(p_idx), .cb_en(cb_en), .wwl(wwl), .fire(fire), .fire_grp(fire_grp),
    .wl_done(wl_done), .pre(pre), .cs_en(cs_en), .comp_en(comp_en), .busy(cmp_busy), .done(cmp_done)
  );

  fg_calibrator u_cal (
    .clk, .rst_n, .start(cal_start && !cal_busy && !busy), .grp(cal_grp),
    .mem_en(cal_mem_en), .mem_we(cal_mem_we), .mem_row(cal_mem_row), .mem_col(cal_mem_col),
    .mem_wdata(cal_mem_wdata), .mem_rdata(mem_rdata),
    .cmp_start(cal_cmp_start), .cmp_done(cmp_done), .q(q), .ramp(ramp),
    .active(cal_active), .done(cal_done)
  );

  logic cal_run;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  cal_run <= 1'b0;
    else if (cal_start && !cal_run && !busy)     cal_run <= 1'b1;
    else if (cal_done)                           cal_run <= 1'b0;
  end
  assign cal_busy = cal_run;

  // ---------------- arrays ----------------
  logic                  a_en, a_we;
  logic [RW-1:0]         a_row;
  logic [1:0]            a_col;
  logic [IO_W-1:0]       a_wdata;
  logic [COLS-1:0]       grp_bits [4];
  logic [COLS-1:0]       rep_bits [4];

  // normal-port arbitration: calibrator, then comparison controller, then host
  always_comb begin
    if (cal_mem_en) begin
      a_en = 1'b1; a_we = cal_mem_we; a_row = RW'(cal_mem_row); a_col = cal_mem_col;
      a_wdata = cal_mem_wdata;
    end else if (ctl_mem_en) begin
      a_en = 1'b1; a_we = 1'b0; a_row = RW'(ctl_mem_row); a_col = ctl_mem_col; a_wdata = '0;
    end else begin
      a_en = mem_en && !busy && !cal_busy; a_we = mem_we; a_row = mem_row; a_col = mem_col;
      a_wdata = mem_wdata;
    end
  end

  sram_bca #(.ROWS(ROWS), .COLS(COLS), .IO_W(IO_W)) u_bca (
    .clk, .en(a_en), .we(a_we), .row(a_row), .col_sel(a_col), .wdata(a_wdata), .rdata(mem_rdata),
    .fr_grp(GW'(wl_grp)), .grp_bits(grp_bits)
  );

  always_comb begin
    for (int w = 0; w < int'(N_CMP); w++) rep_pix[w] = cal_active ? ramp : cmp_pix[w];
  end

  replica_bca u_rep (.clk, .rst_n, .wwl(wwl), .wr_pix(rep_pix), .cells(rep_bits));

  mrwl_driver #(.T0(T0), .GRPS(ROWS/4)) u_wl (
    .clk, .rst_n, .fire(fire), .grp(GW'(fire_grp)), .grp_q(wl_grp), .wl(wl), .rwl(rwl),
    .busy(wl_busy), .done(wl_done)
  );

  imc_compare #(.T0(T0)) u_cmp (
    .clk, .rst_n, .pre(pre), .wl(wl), .rwl(rwl), .t_bits(grp_bits), .r_bits(rep_bits),
    .cs_en(cs_en), .comp_en(comp_en), .offset(cmp_offset), .q(q)
  );

  // ---------------- post-processing ----------------
  soft_t y_soft;
  soft_t t_hat_mem [2][64];
  soft_t t_hat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < 2; m++) for (int i = 0; i < 64; i++) t_hat_mem[m][i] <= '0;
    end else if (that_we) t_hat_mem[that_ha][that_n] <= that_data;
  end
  assign t_hat = t_hat_mem[cur_ha][cur_n];

  strong_accum u_acc (
    .clk, .rst_n, .a_we(alpha_we), .a_addr(alpha_addr), .a_wdata(alpha_wdata),
    .clr(acc_clr), .start(acc_start), .mode_ha(cur_ha), .n(cur_n), .half(half), .q(q),
    .y_soft(y_soft), .busy(acc_busy), .done(acc_done)
  );

  logic [SOFT_W:0] sdm;
  strong_decision u_dec (.y_soft(y_soft), .t_hat(t_hat), .t_h(t_h), .y_bin(y_bin), .sdm(sdm),
                         .confident(confident));

  plurality_voter u_vote (
    .clk, .rst_n, .clr(start && first_batch && !busy), .vote_en(vote_en), .n(cur_n),
    .y_bin(y_bin), .votes(votes), .y_hat(y_hat)
  );

  // Handshake rules between the control blocks.
  a_cmp_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (seq_cmp_start || cal_cmp_start) |-> !cmp_busy)
    else $error("comparison started while one is running");
  a_wl_idle: assert property (@(posedge clk) disable iff (!rst_n) fire |-> !wl_busy)
    else $error("wordline pulses fired while active");
  a_acc_idle: assert property (@(posedge clk) disable iff (!rst_n) acc_start |-> !acc_busy)
    else $error("accumulation started while one is running");
  a_port_one: assert property (@(posedge clk) disable iff (!rst_n) !(cal_mem_en && ctl_mem_en))
    else $error("two blocks on the normal port");

  assign strong_vld = vote_en;
  assign strong_n   = cur_n;
  assign strong_y   = y_bin;
  assign strong_sdm = sdm;
endmodule
