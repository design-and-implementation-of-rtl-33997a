// coordinate_transformation: abc to alpha-beta-gamma.
//
// Applies the power-invariant transformation of the four-leg inverter,
//   alpha = sqrt(2/3) * (va - vb/2 - vc/2)
//   beta  = (vb - vc) / sqrt(2)
//   gamma = (va + vb + vc) / sqrt(3)
// which is the matrix sqrt(2/3) [1 -1/2 -1/2; 0 sqrt3/2 -sqrt3/2;
// 1/sqrt2 1/sqrt2 1/sqrt2] of the document written with the constant
// factor folded into each row. All values are Q2.14 fractions of v_dc and
// the constants are Q2.14 (svm_pkg); products are rounded by truncation
// (arithmetic shift). The fixed-point format is this design's choice.
//
// Timing: one register stage; the output follows the input one cycle later.
module coordinate_transformation
  import svm_pkg::*;
(
  input  logic clk,
  input  abc_t vabc,
  output abg_t vabg
);
  logic signed [V_W+1:0]  s_alpha, s_beta, s_gamma;  // sums before scaling
  logic signed [V_W+17:0] p_alpha, p_beta, p_gamma;

  always_comb begin
    s_alpha = (V_W+2)'(vabc.va) - ((V_W+2)'(vabc.vb) + (V_W+2)'(vabc.vc)) / 2;
    s_beta  = (V_W+2)'(vabc.vb) - (V_W+2)'(vabc.vc);
    s_gamma = (V_W+2)'(vabc.va) + (V_W+2)'(vabc.vb) + (V_W+2)'(vabc.vc);
    p_alpha = (V_W+18)'(s_alpha) * (V_W+18)'(K_SQRT2_3);
    p_beta  = (V_W+18)'(s_beta)  * (V_W+18)'(K_1_SQRT2);
    p_gamma = (V_W+18)'(s_gamma) * (V_W+18)'(K_1_SQRT3);
  end

  always_ff @(posedge clk) begin
    vabg.alpha <= volt_t'(p_alpha >>> FRAC);
    vabg.beta  <= volt_t'(p_beta  >>> FRAC);
    vabg.gamma <= volt_t'(p_gamma >>> FRAC);
  end
endmodule
