// svm_pkg: types and constants shared by the 3-D space vector modulator.
//
// Number format. Every voltage inside the modulator is a signed fixed-point
// fraction of the DC-link voltage v_dc, Q2.14 in 16 bits: 16384 stands for
// v_dc, so the range is about +/-2 v_dc. Durations and switching instants are
// unsigned clock-cycle counts of TIME_W bits, wide enough for the longest
// switching period (1 kHz at 100 MHz = 100000 cycles).
//
// Legs are indexed a=0, b=1, c=2, n=3 (the neutral, fourth leg). A switching
// state is written S_a S_b S_c S_n as in the usual notation, so state "1000"
// has leg a on; in a logic [3:0] the MSB is leg a.
//
// The localisation of the reference vector uses six prisms (the 60-degree
// sectors of the alpha-beta plane) and four tetrahedrons per prism. Inside a
// prism the order of the three phase voltages is fixed; the tetrahedron tells
// where the neutral leg (voltage 0) falls in that order. This order is the
// order in which the legs switch on in the symmetrical sequence, and it also
// gives the rows of the duration matrix. Both are derived here once, so the
// tables in the datapath blocks all come from the same source.
package svm_pkg;

  localparam int V_W    = 16;  // voltage word
  localparam int FRAC   = 14;  // fractional bits, 1.0 = v_dc
  localparam int TIME_W = 17;  // clock-cycle counts

  typedef logic signed [V_W-1:0] volt_t;
  typedef logic [TIME_W-1:0]     cyc_t;

  typedef enum logic [1:0] {LEG_A = 2'd0, LEG_B = 2'd1, LEG_C = 2'd2, LEG_N = 2'd3} leg_e;

  typedef struct packed {
    volt_t va;
    volt_t vb;
    volt_t vc;
  } abc_t;

  typedef struct packed {
    volt_t alpha;
    volt_t beta;
    volt_t gamma;
  } abg_t;

  typedef logic [2:0] prism_t;  // 1..6
  typedef logic [2:0] tet_t;    // 1..4

  // Q2.14 constants of the transformation (I.5) and its inverse.
  localparam int K_SQRT2_3 = 13377;  // sqrt(2/3)
  localparam int K_SQRT2   = 23170;  // sqrt(2)
  localparam int K_1_SQRT2 = 11585;  // 1/sqrt(2)
  localparam int K_1_SQRT3 = 9459;   // 1/sqrt(3)
  localparam int K_1_SQRT6 = 6689;   // 1/sqrt(6)
  localparam int K_SQRT3_2 = 20066;  // sqrt(3/2)
  localparam int K_SQRT3   = 28378;  // sqrt(3)

  // Phase order inside each prism, largest first (prism 1: va > vb > vc).
  function automatic leg_e prism_leg(input int prism, input int rank);
    logic [5:0] o;  // three 2-bit legs, largest first
    case (prism)
      1:       o = {LEG_A, LEG_B, LEG_C};
      2:       o = {LEG_B, LEG_A, LEG_C};
      3:       o = {LEG_B, LEG_C, LEG_A};
      4:       o = {LEG_C, LEG_B, LEG_A};
      5:       o = {LEG_C, LEG_A, LEG_B};
      default: o = {LEG_A, LEG_C, LEG_B};
    endcase
    case (rank)
      0:       return leg_e'(o[5:4]);
      1:       return leg_e'(o[3:2]);
      default: return leg_e'(o[1:0]);
    endcase
  endfunction

  // Order in which the four legs switch on in tetrahedron tet of prism
  // prism (position 0 switches on first). Tetrahedron 1 puts the neutral
  // leg last, tetrahedron 4 first.
  function automatic leg_e on_order(input int prism, input int tet, input int pos);
    int npos;
    npos = 4 - tet;                      // tet 1 -> 3, tet 4 -> 0
    if (pos == npos)     return LEG_N;
    else if (pos < npos) return prism_leg(prism, pos);
    else                 return prism_leg(prism, pos - 1);
  endfunction

  // Switching state applied after the first k legs have switched on.
  function automatic logic [3:0] vector_k(input int prism, input int tet, input int k);
    logic [3:0] s;
    s = 4'b0000;
    for (int p = 0; p < k; p++) s[3 - int'(on_order(prism, tet, p))] = 1'b1;
    return s;
  endfunction

  // Row of the inverse of (I.5): phase-to-neutral voltage of a leg as a
  // combination of alpha, beta, gamma (Q2.14). The neutral leg is 0.
  function automatic int inv_coef(input leg_e leg, input int col);
    case (leg)
      LEG_A:   return (col == 0) ? 2*K_1_SQRT6 : (col == 1) ? 0          : K_1_SQRT3;
      LEG_B:   return (col == 0) ? -K_1_SQRT6  : (col == 1) ? K_1_SQRT2  : K_1_SQRT3;
      LEG_C:   return (col == 0) ? -K_1_SQRT6  : (col == 1) ? -K_1_SQRT2 : K_1_SQRT3;
      default: return 0;
    endcase
  endfunction

  // Element (row, col) of the duration matrix of (II.23), without the T_s
  // factor: t_row / T_s = sum_col coef * [alpha beta gamma]_col / v_dc.
  // Duration of active vector k is the drop between the k-th and (k+1)-th
  // leg in the switch-on order.
  function automatic int dur_coef(input int prism, input int tet, input int row, input int col);
    return inv_coef(on_order(prism, tet, row), col) - inv_coef(on_order(prism, tet, row + 1), col);
  endfunction

endpackage
