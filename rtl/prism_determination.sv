// prism_determination: which of the six prisms holds the reference vector.
//
// The prisms are the six 60-degree sectors of the alpha-beta plane extended
// along gamma, so only alpha and beta matter. The tests are made in the
// order of the document's flow chart, first match wins:
//   prism 1:  0 < beta <= sqrt3*alpha
//   prism 2:  sqrt3*alpha < beta  and  beta >= -sqrt3*alpha
//   prism 3:  0 <= beta < -sqrt3*alpha
//   prism 4:  sqrt3*alpha <= beta < 0
//   prism 5:  beta < sqrt3*alpha  and  beta <= -sqrt3*alpha
//   prism 6:  otherwise
// Prism 1 is the sector where va > vb > vc, and the prisms follow the
// reference counterclockwise. sqrt3*alpha is formed to full precision
// (beta is shifted up rather than the product shifted down), so no
// rounding enters the comparisons.
//
// Timing: one register stage. alpha/beta/gamma are passed on in step with
// the prism number so that later stages see a consistent set.
module prism_determination
  import svm_pkg::*;
(
  input  logic   clk,
  input  abg_t   vabg,
  output prism_t prism,
  output abg_t   vabg_o
);
  logic signed [V_W+FRAC+1:0] b_s, a3;  // beta * 2^14, sqrt3 * alpha (Q.28)
  prism_t p;

  always_comb begin
    b_s = (V_W+FRAC+2)'(vabg.beta) <<< FRAC;
    a3  = (V_W+FRAC+2)'(vabg.alpha) * (V_W+FRAC+2)'(K_SQRT3);
    if      (b_s > 0 && b_s <= a3)                  p = 3'd1;
    else if (a3 < b_s && b_s >= -a3)                p = 3'd2;
    else if (b_s >= 0 && b_s < -a3)                 p = 3'd3;
    else if (a3 <= b_s && b_s < 0)                  p = 3'd4;
    else if (a3 > b_s && b_s <= -a3)                p = 3'd5;
    else                                            p = 3'd6;
  end

  always_ff @(posedge clk) begin
    prism  <= p;
    vabg_o <= vabg;
  end
endmodule
