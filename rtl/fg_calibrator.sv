// fg_calibrator: foreground calibration of the stored thresholds of one row
// group (128 weak classifiers).
//
// Bit-cell mismatch and comparator offset move the threshold a comparator
// actually realises from the stored T to T~ = T + dT. The calibrator measures
// dT in memory and pre-distorts the stored value:
//  1. Read the 128 stored thresholds T through the normal port (16 reads).
//  2. Ramp R_k = 0, 1, ..., 255 through the replica array (`ramp`, `active`);
//     for each step run one in-memory comparison (cmp_start / cmp_done).
//     Since q = 1 while the realised threshold exceeds the pixel, the first
//     step at which q[w] reads 0 gives T~[w] = R_k (256 if q never drops).
//  3. Write back T[w] - dT[w] = 2*T[w] - T~[w], clipped to 0..255 (16 writes).
// `done` pulses when the write-back is complete. The ramp search and the
// update rule follow the calibration procedure; doing it with an on-chip state
// machine rather than a host program, and the clipping, are this design's
// choices. Calibration takes about 256 comparison cycles.
module fg_calibrator
  import abc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [GRP_W-1:0]     grp,
  output logic                 mem_en,
  output logic                 mem_we,
  output logic [GRP_W+1:0]     mem_row,
  output logic [1:0]           mem_col,
  output logic [IO_W-1:0]      mem_wdata,
  input  logic [IO_W-1:0]      mem_rdata,
  output logic                 cmp_start,
  input  logic                 cmp_done,
  input  logic [N_CMP-1:0]     q,
  output pix_t                 ramp,
  output logic                 active,
  output logic                 done
);
  typedef enum logic [2:0] {C_IDLE, C_READ, C_RSTART, C_RWAIT, C_UPDATE, C_WRITE, C_DONE} state_e;
  state_e        st;
  logic [4:0]    k;
  logic          rd_vld;
  logic [3:0]    rd_k;
  logic [GRP_W-1:0] grp_q;
  pix_t          t_word  [N_CMP];
  logic [8:0]    t_real  [N_CMP];
  logic [N_CMP-1:0] found;
  logic [8:0]    step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; k <= '0; rd_vld <= 1'b0; rd_k <= '0; grp_q <= '0;
      found <= '0; step <= '0;
      for (int w = 0; w < int'(N_CMP); w++) begin t_word[w] <= '0; t_real[w] <= '0; end
    end else begin
      rd_vld <= 1'b0;
      if (rd_vld) begin
        for (int j = 0; j < int'(CMP_PER_CB); j++) begin
          logic [6:0] w;
          w = {rd_k[1:0], 5'(j)};
          t_word[w][4 + int'(rd_k[3:2])] <= mem_rdata[2*j];
          t_word[w][int'(rd_k[3:2])]     <= mem_rdata[2*j+1];
        end
      end
      case (st)
        C_IDLE: if (start) begin
          grp_q <= grp; k <= '0; st <= C_READ;
        end
        C_READ: begin
          if (k < 5'd16) begin
            rd_vld <= 1'b1; rd_k <= k[3:0]; k <= k + 1'b1;
          end else if (!rd_vld) begin
            step <= '0; found <= '0; st <= C_RSTART;
          end
        end
        C_RSTART: st <= C_RWAIT;
        C_RWAIT: if (cmp_done) begin
          for (int w = 0; w < int'(N_CMP); w++)
            if (!found[w] && !q[w]) begin
              found[w]  <= 1'b1;
              t_real[w] <= step;
            end
          if (step == 9'd255) st <= C_UPDATE;
          else begin
            step <= step + 1'b1;
            st   <= C_RSTART;
          end
        end
        C_UPDATE: begin
          for (int w = 0; w < int'(N_CMP); w++) begin
            logic signed [10:0] t_new;
            t_new = 11'sd2 * $signed({3'b0, t_word[w]})
                  - $signed({2'b0, (found[w] ? t_real[w] : 9'd256)});
            if (t_new < 0)         t_word[w] <= '0;
            else if (t_new > 255)  t_word[w] <= 8'd255;
            else                   t_word[w] <= t_new[7:0];
          end
          k  <= '0;
          st <= C_WRITE;
        end
        C_WRITE: begin
          if (k == 5'd15) st <= C_DONE;
          k <= k + 1'b1;
        end
        C_DONE:  st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end
  end

  pix_t wr_words [CMP_PER_CB];
  always_comb begin
    for (int j = 0; j < int'(CMP_PER_CB); j++) wr_words[j] = t_word[int'(k[1:0]) * CMP_PER_CB + j];
    mem_en    = (st == C_READ && k < 5'd16) || (st == C_WRITE);
    mem_we    = (st == C_WRITE);
    mem_row   = {grp_q, k[3:2]};
    mem_col   = k[1:0];
    mem_wdata = pack_slice(wr_words, k[3:2]);
    cmp_start = (st == C_RSTART);
    ramp      = step[7:0];
    active    = (st == C_RSTART || st == C_RWAIT);
    done      = (st == C_DONE);
  end
endmodule
