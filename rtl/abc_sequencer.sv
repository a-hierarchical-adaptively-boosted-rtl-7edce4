// abc_sequencer: runs the strong classifiers of one batch in the low-power,
// high-accuracy or hybrid mode.
//
// For each strong classifier n = n_base .. n_base+n_count-1 (held in slot
// s = n - n_base of the bit-cell array, row groups 6s..6s+5) it clears the soft
// decision, then for half = 0 and 1 starts one in-memory comparison and one
// alpha accumulation pass. After the second pass the strong decision is
// available:
//  - LP mode: comparisons use the low-power thresholds with the crossbar
//    bypassed; the decision is voted.
//  - HA mode: comparisons use the high-accuracy thresholds and the crossbar,
//    configured from the pixel-index groups; the decision is voted.
//  - Hybrid mode: the LP pass runs first; if its soft decision margin exceeds
//    T_h (`confident`) the LP decision is voted, otherwise the classifier is
//    re-run in HA mode and the HA decision is voted.
// Every strong classifier thus costs two comparison cycles per mode pass.
// Counters report comparison cycles per mode, hybrid switches to HA and
// confident LP decisions. Timing: `start` (one cycle) begins a batch, `done`
// pulses after the last vote. Slot layout and handshakes are this design's.
module abc_sequencer
  import abc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  mode_e                mode,
  input  logic [N_W-1:0]       n_base,
  input  logic [N_W-1:0]       n_count,
  // in-memory comparison
  output logic                 cmp_start,
  output logic                 cmp_ha,
  output logic [GRP_W-1:0]     p_grp,
  output logic [GRP_W-1:0]     t_grp,
  input  logic                 cmp_done,
  // accumulation and decision
  output logic                 acc_clr,
  output logic                 acc_start,
  output logic                 cur_ha,
  output logic [N_W-1:0]       cur_n,
  output logic                 half,
  input  logic                 acc_done,
  input  logic                 confident,
  // voting
  output logic                 vote_en,
  output logic                 busy,
  output logic                 done,
  output logic [15:0]          cnt_lp_cmp,
  output logic [15:0]          cnt_ha_cmp,
  output logic [15:0]          cnt_switch,
  output logic [15:0]          cnt_confident
);
  typedef enum logic [2:0] {Q_IDLE, Q_CLR, Q_CMP, Q_CWAIT, Q_ACC, Q_AWAIT, Q_DECIDE, Q_DONE} state_e;
  state_e          st;
  mode_e           mode_q;
  logic [N_W-1:0]  n_end;
  logic [GRP_W-1:0] base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= Q_IDLE; mode_q <= MODE_LP; n_end <= '0; cur_n <= '0; cur_ha <= 1'b0; half <= 1'b0;
      base <= '0;
      cnt_lp_cmp <= '0; cnt_ha_cmp <= '0; cnt_switch <= '0; cnt_confident <= '0;
    end else begin
      case (st)
        Q_IDLE: if (start) begin
          mode_q <= mode;
          cur_n  <= n_base;
          n_end  <= n_base + n_count;
          base   <= '0;
          cur_ha <= (mode == MODE_HA);
          cnt_lp_cmp <= '0; cnt_ha_cmp <= '0; cnt_switch <= '0; cnt_confident <= '0;
          st     <= (n_count == '0) ? Q_DONE : Q_CLR;
        end
        Q_CLR: begin
          half <= 1'b0;
          st   <= Q_CMP;
        end
        Q_CMP: begin
          if (cur_ha) cnt_ha_cmp <= cnt_ha_cmp + 1'b1;
          else        cnt_lp_cmp <= cnt_lp_cmp + 1'b1;
          st <= Q_CWAIT;
        end
        Q_CWAIT: if (cmp_done) st <= Q_ACC;
        Q_ACC:   st <= Q_AWAIT;
        Q_AWAIT: if (acc_done) begin
          if (!half) begin
            half <= 1'b1;
            st   <= Q_CMP;
          end else st <= Q_DECIDE;
        end
        Q_DECIDE: begin
          if (mode_q == MODE_HYBRID && !cur_ha && !confident) begin
            cur_ha     <= 1'b1;
            cnt_switch <= cnt_switch + 1'b1;
            st         <= Q_CLR;
          end else begin
            if (mode_q == MODE_HYBRID && !cur_ha) cnt_confident <= cnt_confident + 1'b1;
            cur_n  <= cur_n + 1'b1;
            base   <= base + GRP_W'(GRPS_PER_N);
            cur_ha <= (mode_q == MODE_HA);
            st     <= (cur_n + 1'b1 == n_end) ? Q_DONE : Q_CLR;
          end
        end
        Q_DONE:  st <= Q_IDLE;
        default: st <= Q_IDLE;
      endcase
    end
  end

  always_comb begin
    cmp_start = (st == Q_CMP);
    cmp_ha    = cur_ha;
    p_grp     = base + GRP_W'(OFS_P) + GRP_W'(half);
    t_grp     = base + (cur_ha ? GRP_W'(OFS_THA) : GRP_W'(OFS_TLP)) + GRP_W'(half);
    acc_clr   = (st == Q_CLR);
    acc_start = (st == Q_ACC);
    vote_en   = (st == Q_DECIDE) &&
                !(mode_q == MODE_HYBRID && !cur_ha && !confident);
    busy      = (st != Q_IDLE);
    done      = (st == Q_DONE);
  end
endmodule
