// sram_bca: the 6T SRAM bit-cell array (512 rows x 256 columns, 16 kB).
//
// Two views of one array. The normal port reads or writes a 64-bit slice of a
// row through the 4:1 column mux: col_sel picks columns 64*col_sel ..
// 64*col_sel+63 (contiguous slices are this design's choice). Reads return data
// one cycle after the request. The functional-read view presents the four rows
// 4*fr_grp .. 4*fr_grp+3 that the multi-row wordline driver opens together;
// grp_bits[r] is row 4*fr_grp+r, combinationally. The analog bitline behaviour
// of those cells is modelled in imc_compare.
// The array holds the pixel indices and both threshold sets of the strong
// classifiers (see abc_pkg for the word layout). Contents are not reset.
module sram_bca #(
  parameter int unsigned ROWS = 512,
  parameter int unsigned COLS = 256,
  parameter int unsigned IO_W = 64
) (
  input  logic                              clk,
  input  logic                              en,
  input  logic                              we,
  input  logic [$clog2(ROWS)-1:0]           row,
  input  logic [$clog2(COLS/IO_W)-1:0]      col_sel,
  input  logic [IO_W-1:0]                   wdata,
  output logic [IO_W-1:0]                   rdata,
  input  logic [$clog2(ROWS/4)-1:0]         fr_grp,
  output logic [COLS-1:0]                   grp_bits [4]
);
  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[row][int'(col_sel)*IO_W +: IO_W] <= wdata;
      else    rdata <= mem[row][int'(col_sel)*IO_W +: IO_W];
    end
  end

  always_comb begin
    for (int r = 0; r < 4; r++) grp_bits[r] = mem[{fr_grp, 2'(r)}];
  end
endmodule
