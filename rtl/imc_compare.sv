// imc_compare: behavioural model of the analog in-memory comparison: bitline
// discharge, weighted charge sharing and the 128 comparators.
//
// This is a model of mixed-signal circuitry, written as cycle-based integer
// arithmetic: voltages are counted in units of the per-LSB bitline swing.
// While wordline WL_r (replica RWL_r) is high, a column's BL loses one unit per
// cycle if the cell's BL-side node stores 0, and BLB loses one unit if the
// BLB-side node stores 0. A 6T cell holding threshold bit t discharges BL for
// t=0 and BLB for t=1; a replica cell holding ~x discharges BL for x=1 and BLB
// for x=0. With binary-weighted pulses the MSB column of word w collects
// sum 2^r (~t[4+r] + x[4+r]) and the LSB column the same for bits r.
// `cs_en` charge-shares the two columns with a 16:1 weight, giving
// dV_BL ~ 255 - T + X and dV_BLB ~ 255 - X + T. On `comp_en` each comparator
// resolves q = 1 when V_BL > V_BLB, i.e. when T > X, shifted by its
// input-referred offset `offset[w]` (in threshold LSBs): q = (T + offset > X).
// `pre` precharges (clears) all bitlines. q holds its value until the next
// comp_en. T0 must match the wordline driver's unit pulse width.
module imc_compare
  import abc_pkg::*;
#(
  parameter int unsigned T0 = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pre,
  input  logic [3:0]              wl,
  input  logic [3:0]              rwl,
  input  logic [COLS-1:0]         t_bits [4],
  input  logic [COLS-1:0]         r_bits [4],
  input  logic                    cs_en,
  input  logic                    comp_en,
  input  logic signed [5:0]       offset [N_CMP],
  output logic [N_CMP-1:0]        q
);
  localparam int unsigned AW = 16;

  logic [AW-1:0] dbl  [COLS];   // accumulated BL discharge per column
  logic [AW-1:0] dblb [COLS];
  logic signed [AW+5:0] vdiff [N_CMP];   // charge-shared dV_BLB - dV_BL

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(COLS); c++) begin
        dbl[c]  <= '0;
        dblb[c] <= '0;
      end
      for (int w = 0; w < int'(N_CMP); w++) vdiff[w] <= '0;
      q <= '0;
    end else begin
      if (pre) begin
        for (int c = 0; c < int'(COLS); c++) begin
          dbl[c]  <= '0;
          dblb[c] <= '0;
        end
      end else begin
        for (int c = 0; c < int'(COLS); c++) begin
          logic [AW-1:0] a, b;
          a = dbl[c];
          b = dblb[c];
          for (int r = 0; r < 4; r++) begin
            if (wl[r])  begin a += AW'(!t_bits[r][c]); b += AW'(t_bits[r][c]); end
            if (rwl[r]) begin a += AW'(!r_bits[r][c]); b += AW'(r_bits[r][c]); end
          end
          dbl[c]  <= a;
          dblb[c] <= b;
        end
      end
      if (cs_en) begin
        for (int w = 0; w < int'(N_CMP); w++)
          vdiff[w] <= ($signed({6'b0, dblb[2*w]}) * 16 + $signed({6'b0, dblb[2*w+1]}))
                    - ($signed({6'b0, dbl[2*w]})  * 16 + $signed({6'b0, dbl[2*w+1]}));
      end
      if (comp_en) begin
        for (int w = 0; w < int'(N_CMP); w++)
          q[w] <= (vdiff[w] + 22'(2 * int'(T0)) * 22'(offset[w])) > 0;
      end
    end
  end
endmodule
