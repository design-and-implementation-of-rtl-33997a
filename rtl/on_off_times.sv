// on_off_times: switch-on and switch-off instant of each leg.
//
// The switching period is laid out symmetrically in ten segments:
//   0000 | v1 | v2 | v3 | 1111 || 1111 | v3 | v2 | v1 | 0000
//   t4/4  t1/2 t2/2 t3/2  t4/4    t4/4   t3/2 t2/2 t1/2 t4/4
// so each leg switches exactly once on and once off per period, one leg per
// vector change, and the zero time t4 is shared equally by 0000 and 1111.
// The leg at position p (0..3) of the switch-on order of the tetrahedron
// (svm_pkg::on_order) therefore switches on at
//   t_on  = t4/4 + (t1 + ... + t_p)/2
// and off at t_off = T_s - t_on, counting clock cycles from the period
// start. A leg is on while t_on <= count < t_off.
//
// The segment layout and the vector order follow the document; the order is
// derived from the prism's phase ranking rather than copied from a table.
// Halving and quartering truncate.
//
// Timing: one register stage; ts is passed on with the instants.
module on_off_times
  import svm_pkg::*;
(
  input  logic   clk,
  input  prism_t prism,
  input  tet_t   tet,
  input  cyc_t   t1,
  input  cyc_t   t2,
  input  cyc_t   t3,
  input  cyc_t   t4,
  input  cyc_t   ts,
  output cyc_t   t_on  [4],
  output cyc_t   t_off [4],
  output cyc_t   ts_o
);
  // Position of each leg in the switch-on order, two bits per entry,
  // entry ((prism-1)*4 + (tet-1))*4 + leg.
  typedef logic [191:0] pos_t;

  function automatic pos_t make_pos();
    pos_t m;
    m = '0;
    for (int p = 1; p <= 6; p++)
      for (int t = 1; t <= 4; t++)
        for (int k = 0; k < 4; k++)
          m[(((p-1)*4 + (t-1))*4 + int'(on_order(p, t, k)))*2 +: 2] = 2'(k);
    return m;
  endfunction

  localparam pos_t POS = make_pos();

  logic [2:0] pi, ti;
  logic [1:0] lpos [4];
  logic [TIME_W+1:0] edge_at [4];        // on instant of the p-th leg
  logic [TIME_W+1:0] on_c  [4];
  logic [TIME_W+1:0] off_c [4];

  always_comb begin
    pi = (prism >= 3'd1 && prism <= 3'd6) ? prism - 3'd1 : 3'd0;
    ti = (tet   >= 3'd1 && tet   <= 3'd4) ? tet   - 3'd1 : 3'd0;
    edge_at[0] = (TIME_W+2)'(t4) >> 2;
    edge_at[1] = edge_at[0] + ((TIME_W+2)'(t1) >> 1);
    edge_at[2] = edge_at[0] + (((TIME_W+2)'(t1) + (TIME_W+2)'(t2)) >> 1);
    edge_at[3] = edge_at[0] + (((TIME_W+2)'(t1) + (TIME_W+2)'(t2) + (TIME_W+2)'(t3)) >> 1);
    for (int l = 0; l < 4; l++) begin
      lpos[l]  = POS[((32'(pi)*4 + 32'(ti))*4 + l)*2 +: 2];
      on_c[l]  = edge_at[lpos[l]];
      if (on_c[l] > (TIME_W+2)'(ts)) on_c[l] = (TIME_W+2)'(ts);
      off_c[l] = (TIME_W+2)'(ts) - on_c[l];
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < 4; l++) begin
      t_on[l]  <= cyc_t'(on_c[l]);
      t_off[l] <= cyc_t'(off_c[l]);
    end
    ts_o <= ts;
  end
endmodule
