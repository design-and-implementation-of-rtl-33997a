// tetrahedron_identification: which tetrahedron of the prism holds the
// reference vector.
//
// Each prism is cut into four tetrahedrons by the planes on which one of
// the phase-to-neutral voltages is zero. In alpha-beta-gamma these planes are
//   va = 0:  gamma = -sqrt2 * alpha
//   vb = 0:  gamma = alpha/sqrt2 - sqrt(3/2) * beta
//   vc = 0:  gamma = alpha/sqrt2 + sqrt(3/2) * beta
// and the block compares gamma with each ("above" means the phase voltage
// is positive). With the phases of the prism ranked x1 > x2 > x3:
//   tetrahedron 1: gamma above the x3 plane            (all phases > 0)
//   tetrahedron 2: above the x2 plane, not above x3
//   tetrahedron 3: above the x1 plane, not above x2
//   tetrahedron 4: not above the x1 plane              (all phases <= 0)
// This is the pairwise test of the document's localisation table (upper
// plane strict, lower plane inclusive). The outer limits at +/-sqrt3 v_dc
// in that table mark the edge of the linear range; this design does not
// test them (the linear range is the user's responsibility), so a reference that
// is too large is still given a tetrahedron.
//
// Timing: one register stage; prism and alpha/beta/gamma are passed on.
module tetrahedron_identification
  import svm_pkg::*;
(
  input  logic   clk,
  input  prism_t prism,
  input  abg_t   vabg,
  output tet_t   tet,
  output prism_t prism_o,
  output abg_t   vabg_o
);
  localparam int PW = V_W + FRAC + 3;
  logic signed [PW-1:0] g_s, pa, pb, pc;
  logic [2:0] above;          // bit = leg a, b, c: phase voltage > 0
  logic [2:0] pi;
  tet_t t;

  always_comb begin
    g_s = PW'(vabg.gamma) <<< FRAC;
    pa  = -(PW'(vabg.alpha) * PW'(K_SQRT2));
    pb  = PW'(vabg.alpha) * PW'(K_1_SQRT2) - PW'(vabg.beta) * PW'(K_SQRT3_2);
    pc  = PW'(vabg.alpha) * PW'(K_1_SQRT2) + PW'(vabg.beta) * PW'(K_SQRT3_2);
    above[0] = g_s > pa;
    above[1] = g_s > pb;
    above[2] = g_s > pc;
    pi = (prism >= 3'd1 && prism <= 3'd6) ? prism : 3'd1;
    if      (above[prism_leg(int'(pi), 2)]) t = 3'd1;
    else if (above[prism_leg(int'(pi), 1)]) t = 3'd2;
    else if (above[prism_leg(int'(pi), 0)]) t = 3'd3;
    else                                    t = 3'd4;
  end

  always_ff @(posedge clk) begin
    tet     <= t;
    prism_o <= prism;
    vabg_o  <= vabg;
  end
endmodule
