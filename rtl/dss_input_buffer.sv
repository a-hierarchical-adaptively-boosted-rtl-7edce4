// dss_input_buffer: input image buffer with deterministic sub-sampling (DSS).
//
// The 256 8-bit pixels of an image are streamed in over the 64-bit I/O, eight
// pixels per write. Pixel i (0-based) of the image lands in bank i%4 at index
// i/4, so bank 0 holds X1, X5, ..., X253, bank 1 holds X2, X6, ..., X254 and so
// on (1-based names). Each bank feeds one 64:1 crossbar. All pixels are visible
// in parallel on bank_pix.
//
// Interface: wr_en/wr_addr/wr_data write pixels 8*wr_addr .. 8*wr_addr+7, pixel
// 8*wr_addr+k in wr_data[8k+7:8k]. Timing: a write is visible on bank_pix the
// cycle after the clock edge that takes it. Reset clears the buffer.
// The bank split follows the architecture; the flip-flop storage and the write
// format are this design's choices.
module dss_input_buffer
  import abc_pkg::*;
#(
  parameter int unsigned N_PIX_P = N_PIX,
  parameter int unsigned IO_W_P  = IO_W
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  logic                                          wr_en,
  input  logic [$clog2(N_PIX_P/(IO_W_P/PIX_W))-1:0]     wr_addr,
  input  logic [IO_W_P-1:0]                             wr_data,
  output pix_t                                          bank_pix [N_BANK][N_PIX_P/N_BANK]
);
  localparam int unsigned PPW = IO_W_P / PIX_W;  // pixels per write

  pix_t pix_q [N_PIX_P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_PIX_P); i++) pix_q[i] <= '0;
    end else if (wr_en) begin
      for (int k = 0; k < int'(PPW); k++)
        pix_q[int'(wr_addr) * PPW + k] <= wr_data[k*PIX_W +: PIX_W];
    end
  end

  always_comb begin
    for (int b = 0; b < int'(N_BANK); b++)
      for (int j = 0; j < int'(N_PIX_P / N_BANK); j++)
        bank_pix[b][j] = pix_q[j * N_BANK + b];
  end
endmodule
