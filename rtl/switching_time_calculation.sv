// switching_time_calculation: on-durations of the four switching vectors.
//
// Inside a tetrahedron the reference is the time average of its three
// active vectors and the zero vectors (0000/1111):
//   v1 t1 + v2 t2 + v3 t3 + v0 t4 = v* T_s,   t1 + t2 + t3 + t4 = T_s.
// Solving gives, per tetrahedron, a constant 3x3 matrix M with
//   [t1 t2 t3]^T = M [alpha beta gamma]^T * T_s / v_dc,   t4 = T_s - t1 - t2 - t3.
// The 24 matrices are built at elaboration from svm_pkg::dur_coef: row k is
// the difference of the inverse-transformation rows of the k-th and
// (k+1)-th leg in the switch-on order of the tetrahedron, i.e. t_k/T_s is
// the voltage step between those two legs. The hardware picks one matrix by
// (prism, tetrahedron) and does nine constant-by-variable products.
//
// Inputs are Q2.14 voltages (fractions of v_dc) and the switching period
// `ts` in clock cycles; outputs are cycle counts, rounded to nearest. A
// duration that rounding makes slightly negative is clamped to 0, and t4 is
// clamped to 0 when the reference lies outside the linear range (sum of
// active times above T_s); the document does not treat over-modulation.
//
// Timing: one register stage; prism, tetrahedron and ts are passed on with
// the durations.
module switching_time_calculation
  import svm_pkg::*;
(
  input  logic   clk,
  input  prism_t prism,
  input  tet_t   tet,
  input  abg_t   vabg,
  input  cyc_t   ts,
  output cyc_t   t1,
  output cyc_t   t2,
  output cyc_t   t3,
  output cyc_t   t4,
  output prism_t prism_o,
  output tet_t   tet_o,
  output cyc_t   ts_o
);
  // Flat table, entry ((prism-1)*4 + (tet-1))*9 + row*3 + col.
  typedef int coef_t [216];

  function automatic coef_t make_coef();
    coef_t c;
    for (int p = 1; p <= 6; p++)
      for (int t = 1; t <= 4; t++)
        for (int r = 0; r < 3; r++)
          for (int k = 0; k < 3; k++)
            c[((p-1)*4 + (t-1))*9 + r*3 + k] = dur_coef(p, t, r, k);
    return c;
  endfunction

  localparam coef_t COEF = make_coef();

  localparam int SW = V_W + 19;           // coefficient * voltage sum, Q.28
  localparam int PW = SW + TIME_W + 1;    // times ts

  logic [2:0] pi, ti;
  logic [7:0] base;
  logic signed [SW-1:0] s   [3];
  logic signed [PW-1:0] prd [3];
  logic signed [PW-1:0] tr  [3];
  cyc_t                 tc  [3];
  logic signed [TIME_W+2:0] t0s;

  always_comb begin
    pi = (prism >= 3'd1 && prism <= 3'd6) ? prism - 3'd1 : 3'd0;
    ti = (tet   >= 3'd1 && tet   <= 3'd4) ? tet   - 3'd1 : 3'd0;
    base = (8'(pi) * 8'd4 + 8'(ti)) * 8'd9;
    for (int r = 0; r < 3; r++) begin
      s[r] = SW'(COEF[base + 8'(r*3)])     * SW'(vabg.alpha)
           + SW'(COEF[base + 8'(r*3 + 1)]) * SW'(vabg.beta)
           + SW'(COEF[base + 8'(r*3 + 2)]) * SW'(vabg.gamma);
      prd[r] = PW'(s[r]) * PW'({1'b0, ts});
      tr[r]  = (prd[r] + (PW'(1) <<< (2*FRAC - 1))) >>> (2*FRAC);
      if (tr[r] < 0)             tc[r] = '0;
      else if (tr[r] > PW'(ts))  tc[r] = ts;
      else                       tc[r] = cyc_t'(tr[r]);
    end
    t0s = (TIME_W+3)'(ts) - (TIME_W+3)'(tc[0]) - (TIME_W+3)'(tc[1]) - (TIME_W+3)'(tc[2]);
  end

  always_ff @(posedge clk) begin
    t1      <= tc[0];
    t2      <= tc[1];
    t3      <= tc[2];
    t4      <= (t0s < 0) ? '0 : cyc_t'(t0s);
    prism_o <= prism;
    tet_o   <= tet;
    ts_o    <= ts;
  end
endmodule
