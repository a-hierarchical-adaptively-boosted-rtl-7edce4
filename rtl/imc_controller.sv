// imc_controller: sequencer of one in-memory comparison cycle (128 weak
// classifiers in parallel).
//
// Phases, in order:
//  1. Crossbar operation (high-accuracy mode only, `ha`=1): the 128 pixel
//     indices of row group p_grp are read through the normal 64-bit port (16
//     reads: 4 rows x 4 column-mux positions) into the crossbar configuration
//     register p_idx. cb_en is high from here to the end of phase 2.
//  2. Replica write: the routed pixels are written into the replica array, one
//     row per cycle, wwl[3] first down to wwl[0]; the bitlines are precharged
//     (`pre`) meanwhile.
//  3. Functional read: `fire` starts the binary-weighted wordline pulses on
//     row group t_grp and the replica rows; the controller waits for the
//     driver's `wl_done`.
//  4. Charge sharing (`cs_en`, one cycle), then comparator enable (`comp_en`,
//     one cycle). `done` pulses the cycle after, when q is valid.
// Cycle count, from the `start` cycle to the `done` cycle: 9 + 8*T0 for a
// low-power comparison and 18 more with the crossbar phase. The phase order
// follows the timing of the in-memory comparison; the cycle counts per phase,
// the pixel-index read through the normal port and the replica row order are
// this design's choices.
module imc_controller
  import abc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 ha,
  input  logic [GRP_W-1:0]     p_grp,
  input  logic [GRP_W-1:0]     t_grp,
  // normal-port reads of the pixel indices
  output logic                 mem_en,
  output logic [GRP_W+1:0]     mem_row,
  output logic [1:0]           mem_col,
  input  logic [IO_W-1:0]      mem_rdata,
  output logic [IDX_W-1:0]     p_idx [N_CMP],
  // array control
  output logic                 cb_en,
  output logic [3:0]           wwl,
  output logic                 fire,
  output logic [GRP_W-1:0]     fire_grp,
  input  logic                 wl_done,
  output logic                 pre,
  output logic                 cs_en,
  output logic                 comp_en,
  output logic                 busy,
  output logic                 done
);
  typedef enum logic [2:0] {S_IDLE, S_PREAD, S_RWRITE, S_FIRE, S_WAIT, S_CS, S_COMP, S_DONE} state_e;
  state_e        st;
  logic [4:0]    k;        // read counter (PREAD) / row counter (RWRITE)
  logic          rd_vld;
  logic [3:0]    rd_k;
  logic [GRP_W-1:0] t_grp_q, p_grp_q;
  logic          ha_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; k <= '0; rd_vld <= 1'b0; rd_k <= '0;
      t_grp_q <= '0; p_grp_q <= '0; ha_q <= 1'b0;
      for (int w = 0; w < int'(N_CMP); w++) p_idx[w] <= '0;
    end else begin
      rd_vld <= 1'b0;
      // capture returning pixel-index slices: read rd_k = {row r, mux s}
      if (rd_vld) begin
        for (int j = 0; j < int'(CMP_PER_CB); j++) begin
          logic [6:0] w;
          w = {rd_k[1:0], 5'(j)};
          // p is the low 6 bits of the 8-bit word: bit 4+r (r<2) and bit r
          if (rd_k[3:2] < 2'd2) p_idx[w][4 + int'(rd_k[3:2])] <= mem_rdata[2*j];
          p_idx[w][int'(rd_k[3:2])] <= mem_rdata[2*j+1];
        end
      end
      case (st)
        S_IDLE: if (start) begin
          t_grp_q <= t_grp; p_grp_q <= p_grp; ha_q <= ha; k <= '0;
          st <= ha ? S_PREAD : S_RWRITE;
        end
        S_PREAD: begin
          if (k < 5'd16) begin
            rd_vld <= 1'b1;
            rd_k   <= k[3:0];
            k      <= k + 1'b1;
          end else if (!rd_vld) begin
            k  <= '0;
            st <= S_RWRITE;
          end
        end
        S_RWRITE: begin
          if (k == 5'd3) st <= S_FIRE;
          k <= k + 1'b1;
        end
        S_FIRE:  st <= S_WAIT;
        S_WAIT:  if (wl_done) st <= S_CS;
        S_CS:    st <= S_COMP;
        S_COMP:  st <= S_DONE;
        S_DONE:  st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_en   = (st == S_PREAD) && (k < 5'd16);
    mem_row  = {p_grp_q, k[3:2]};
    mem_col  = k[1:0];
    cb_en    = ha_q && (st == S_PREAD || st == S_RWRITE);
    wwl      = (st == S_RWRITE) ? (4'b1000 >> k[1:0]) : 4'b0000;
    pre      = (st == S_RWRITE);
    fire     = (st == S_FIRE);
    fire_grp = t_grp_q;
    cs_en    = (st == S_CS);
    comp_en  = (st == S_COMP);
    busy     = (st != S_IDLE);
    done     = (st == S_DONE);
  end
endmodule
