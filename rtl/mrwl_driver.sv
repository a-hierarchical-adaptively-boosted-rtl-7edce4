// mrwl_driver: multi-row wordline driver with row decoder.
//
// For a multi-row functional read the driver opens the four rows of one row
// group at once with binary pulse-width-modulated pulses: WL_r and the matching
// replica wordline RWL_r are high for 2^r * T0 clock cycles, all pulses starting
// together, so the bitline discharge is weighted by bit significance.
// Interface: `fire` (one cycle) latches `grp` into grp_q and starts the pulses;
// `done` pulses for one cycle after the longest pulse (8*T0 cycles) ends.
// `busy` is high while pulses are active. T0, the unit pulse width in clock
// cycles, is this design's choice (the document gives no value).
module mrwl_driver #(
  parameter int unsigned T0   = 1,
  parameter int unsigned GRPS = 128
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         fire,
  input  logic [$clog2(GRPS)-1:0]      grp,
  output logic [$clog2(GRPS)-1:0]      grp_q,
  output logic [3:0]                   wl,
  output logic [3:0]                   rwl,
  output logic                         busy,
  output logic                         done
);
  localparam int unsigned CW = $clog2(8*T0 + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      grp_q <= '0;
    end else begin
      done <= 1'b0;
      if (fire && !busy) begin
        grp_q <= grp;
        cnt   <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        if (int'(cnt) == 8*T0 - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb begin
    for (int r = 0; r < 4; r++) wl[r] = busy && (int'(cnt) < (T0 << r));
    rwl = wl;
  end
endmodule
