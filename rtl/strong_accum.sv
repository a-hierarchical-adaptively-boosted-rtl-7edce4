// strong_accum: soft-decision accumulator of a strong classifier,
// y~ = sum over m of alpha[m] * q[m].
//
// The weak decisions q of one in-memory comparison cycle (128 weak classifiers,
// cycle `half` of strong classifier n) are weighted by their alpha coefficients
// and added to the running soft decision, LANES (8) alphas per clock from a
// 64-bit wide alpha memory, like the multiply / add / register loop of the
// post-processing. A strong classifier's soft decision is complete after its
// two comparison cycles.
// Alpha memory: word {mode_ha, n, m/8} holds alpha[m..m+7] (8-bit two's
// complement, alpha[m+k] in bits 8k+7:8k); separate tables for the low-power
// and high-accuracy weak classifiers. Written by the host through a_we.
// Timing: `clr` zeroes y_soft; `start` begins one pass of 16 memory reads and
// `done` pulses 17 cycles after the start cycle, with y_soft updated. Alpha precision and the per-mode tables are
// this design's choices.
module strong_accum
  import abc_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 a_we,
  input  logic [11:0]          a_addr,
  input  logic [IO_W-1:0]      a_wdata,
  input  logic                 clr,
  input  logic                 start,
  input  logic                 mode_ha,
  input  logic [N_W-1:0]       n,
  input  logic                 half,
  input  logic [N_CMP-1:0]     q,
  output soft_t                y_soft,
  output logic                 busy,
  output logic                 done
);
  localparam int unsigned STEPS = N_CMP / LANES;

  logic [IO_W-1:0] amem [4096];
  logic [IO_W-1:0] a_rd;
  logic [4:0]      step;
  logic            rd_vld;
  logic [3:0]      rd_step;
  logic            run;
  logic            last;

  always_ff @(posedge clk) begin
    if (a_we) amem[a_addr] <= a_wdata;
    a_rd <= amem[{mode_ha, n, half, step[3:0]}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_soft <= '0; step <= '0; rd_vld <= 1'b0; rd_step <= '0; run <= 1'b0; last <= 1'b0;
    end else begin
      last   <= 1'b0;
      rd_vld <= run;
      rd_step <= step[3:0];
      if (start && !run) begin
        run  <= 1'b1;
        step <= '0;
      end else if (run) begin
        if (int'(step) == STEPS - 1) run <= 1'b0;
        step <= step + 1'b1;
      end
      if (clr) y_soft <= '0;
      else if (rd_vld) begin
        soft_t acc;
        acc = y_soft;
        for (int l = 0; l < int'(LANES); l++)
          if (q[int'(rd_step) * LANES + l])
            acc += SOFT_W'($signed(a_rd[l*ALPHA_W +: ALPHA_W]));
        y_soft <= acc;
        if (int'(rd_step) == STEPS - 1) last <= 1'b1;
      end
    end
  end

  assign busy = run | rd_vld | last;
  assign done = last;
endmodule
