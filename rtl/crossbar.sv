// crossbar: one 64x32 pixel crossbar of the high-accuracy mode.
//
// Each of the 32 outputs selects any of the 64 pixels of one sub-sampled bank by
// its own 6-bit pixel index, so several comparators may read the same pixel
// (many-to-one mapping of pixels to thresholds). Purely combinational.
// Interface: in_pix (64 pixels), sel (32 indices), out_pix (32 pixels).
// The size comes from the architecture; the mux realisation is this design's.
module crossbar #(
  parameter int unsigned N_IN  = 64,
  parameter int unsigned N_OUT = 32,
  parameter int unsigned W     = 8
) (
  input  logic [W-1:0]              in_pix  [N_IN],
  input  logic [$clog2(N_IN)-1:0]   sel     [N_OUT],
  output logic [W-1:0]              out_pix [N_OUT]
);
  always_comb begin
    for (int o = 0; o < int'(N_OUT); o++) out_pix[o] = in_pix[sel[o]];
  end
endmodule
