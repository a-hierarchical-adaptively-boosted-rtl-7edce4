// strong_decision: binary decision and confidence of a strong classifier.
//
// y_bin = 1 when the soft decision reaches the strong-classifier threshold
// (y_soft >= t_hat), i.e. the sign of y_soft - t_hat with zero counted as
// positive (this design's choice). The soft decision margin is
// sdm = |y_soft - t_hat|, and the decision counts as confident when
// sdm > t_h (margin thresholding of the hybrid mode). Combinational.
module strong_decision
  import abc_pkg::*;
(
  input  soft_t                 y_soft,
  input  soft_t                 t_hat,
  input  logic [SOFT_W-1:0]     t_h,
  output logic                  y_bin,
  output logic [SOFT_W:0]       sdm,
  output logic                  confident
);
  logic signed [SOFT_W:0] diff;
  always_comb begin
    diff      = (SOFT_W+1)'(y_soft) - (SOFT_W+1)'(t_hat);
    y_bin     = !diff[SOFT_W];
    sdm       = diff[SOFT_W] ? -diff : diff;
    confident = sdm > {1'b0, t_h};
  end
endmodule
