// replica_bca: the 4x256 replica bit-cell array that holds the pixels during an
// in-memory comparison.
//
// Each replica cell has an extra write port (write wordline WWL, write bitline
// WBL), so the 128 pixels routed to the comparators are written quickly, one row
// per WWL pulse. As in the stored thresholds, pixel w occupies columns 2w (MSB
// column) and 2w+1 (LSB column); row r holds the complemented bits ~x[4+r] and
// ~x[r]. The cells face the same bitlines as the 6T array (read wordlines RWL)
// and are read by imc_compare through `cells`.
// Interface: wwl[r] high at a clock edge writes row r from wr_pix. Reset sets all
// cells to 1 (a stored pixel of 0). Complemented storage follows the
// architecture; row-by-row writing and the reset value are this design's.
module replica_bca
  import abc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       wwl,
  input  pix_t             wr_pix [N_CMP],
  output logic [COLS-1:0]  cells  [4]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++) cells[r] <= '1;
    end else begin
      for (int r = 0; r < 4; r++)
        if (wwl[r])
          for (int w = 0; w < int'(N_CMP); w++) begin
            cells[r][2*w]   <= ~wr_pix[w][4+r];
            cells[r][2*w+1] <= ~wr_pix[w][r];
          end
    end
  end
endmodule
