// crossbar_switch: routes the buffered pixels to the 128 in-memory comparators.
//
// Comparators 32g..32g+31 belong to DSS bank g and to crossbar g. In the
// high-accuracy mode (cb_en=1) comparator w receives pixel p_idx[w] of its bank
// through the crossbar. In the low-power mode (cb_en=0) the crossbar is
// bypassed with a fixed one-to-one mapping: in comparison cycle `half`,
// comparator w receives pixel 32*half + (w%32) of its bank, so the two cycles of
// a strong classifier visit each of the 256 pixels exactly once.
// Combinational. The bypass mapping is this design's choice.
module crossbar_switch
  import abc_pkg::*;
(
  input  pix_t                  bank_pix [N_BANK][BANK_PIX],
  input  logic                  cb_en,
  input  logic                  half,
  input  logic [IDX_W-1:0]      p_idx    [N_CMP],
  output pix_t                  cmp_pix  [N_CMP]
);
  pix_t cb_out [N_BANK][CMP_PER_CB];

  for (genvar g = 0; g < int'(N_BANK); g++) begin : g_cb
    logic [IDX_W-1:0] sel [CMP_PER_CB];
    always_comb begin
      for (int j = 0; j < int'(CMP_PER_CB); j++) sel[j] = p_idx[g*CMP_PER_CB + j];
    end
    crossbar #(.N_IN(BANK_PIX), .N_OUT(CMP_PER_CB), .W(PIX_W)) u_cb (
      .in_pix (bank_pix[g]),
      .sel    (sel),
      .out_pix(cb_out[g])
    );
  end

  always_comb begin
    for (int g = 0; g < int'(N_BANK); g++)
      for (int j = 0; j < int'(CMP_PER_CB); j++)
        cmp_pix[g*CMP_PER_CB + j] = cb_en ? cb_out[g][j]
                                          : bank_pix[g][int'(half)*CMP_PER_CB + j];
  end
endmodule
