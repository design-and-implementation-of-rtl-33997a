// tb_switching_time_calculation: random references inside the linear range
// for each of the three switching periods. The expected durations are
// worked out here by sorting the four leg voltages (va, vb, vc and 0 for
// the neutral leg) in descending order: t_k = (u_k - u_k+1) * T_s, and the
// zero-vector time t4 = T_s - (u_1 - u_4) * T_s. This also yields the
// prism and tetrahedron fed to the block. Tolerance: 0.05 % of T_s + 2.
module tb_switching_time_calculation;
  import svm_pkg::*;
  logic clk = 1'b0;
  abg_t vabg;
  prism_t prism, prism_o;
  tet_t tet, tet_o;
  cyc_t ts, ts_o, t1, t2, t3, t4;
  int checks = 0, failures = 0;
  int seen [7][5];

  always #5 clk = ~clk;

  switching_time_calculation dut (.clk(clk), .prism(prism), .tet(tet), .vabg(vabg), .ts(ts),
    .t1(t1), .t2(t2), .t3(t3), .t4(t4), .prism_o(prism_o), .tet_o(tet_o), .ts_o(ts_o));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input cyc_t got, input real want, input real tol);
    real d;
    d = real'(got) - want;
    return (d <= tol) && (d >= -tol);
  endfunction

  initial begin
    int periods [3] = '{100000, 50000, 20000};
    for (int k = 0; k < 6000; k++) begin
      real v [4];
      real u [4];
      real al, be, ga, tol, tmp;
      int p, t;
      for (int i = 0; i < 3; i++) v[i] = (real'($urandom_range(0, 1200)) - 600.0) / 1000.0;
      v[3] = 0.0;
      u = v;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 3 - i; j++)
          if (u[j] < u[j+1]) begin tmp = u[j]; u[j] = u[j+1]; u[j+1] = tmp; end
      if (u[0] - u[3] > 0.95) continue;       // outside the linear range
      if      (v[0] >= v[1] && v[1] >= v[2]) p = 1;
      else if (v[1] >= v[0] && v[0] >= v[2]) p = 2;
      else if (v[1] >= v[2] && v[2] >= v[0]) p = 3;
      else if (v[2] >= v[1] && v[1] >= v[0]) p = 4;
      else if (v[2] >= v[0] && v[0] >= v[1]) p = 5;
      else                                   p = 6;
      t = 1;
      for (int i = 0; i < 3; i++) if (v[i] <= 0.0) t++;
      al = $sqrt(2.0/3.0) * (v[0] - v[1]/2.0 - v[2]/2.0);
      be = (v[1] - v[2]) / $sqrt(2.0);
      ga = (v[0] + v[1] + v[2]) / $sqrt(3.0);
      vabg.alpha = volt_t'($rtoi(al * 16384.0));
      vabg.beta  = volt_t'($rtoi(be * 16384.0));
      vabg.gamma = volt_t'($rtoi(ga * 16384.0));
      prism = 3'(p);
      tet   = 3'(t);
      ts    = cyc_t'(periods[k % 3]);
      @(posedge clk); #1;
      tol = 0.0005 * real'(ts) + 2.0;
      check(near(t1, (u[0] - u[1]) * real'(ts), tol), $sformatf("p%0d t%0d: t1 %0d expected %f", p, t, t1, (u[0]-u[1])*real'(ts)));
      check(near(t2, (u[1] - u[2]) * real'(ts), tol), $sformatf("p%0d t%0d: t2 %0d expected %f", p, t, t2, (u[1]-u[2])*real'(ts)));
      check(near(t3, (u[2] - u[3]) * real'(ts), tol), $sformatf("p%0d t%0d: t3 %0d expected %f", p, t, t3, (u[2]-u[3])*real'(ts)));
      check(near(t4, (1.0 - u[0] + u[3]) * real'(ts), 2.0 * tol), $sformatf("p%0d t%0d: t4 %0d expected %f", p, t, t4, (1.0-u[0]+u[3])*real'(ts)));
      check(prism_o == prism && tet_o == tet && ts_o == ts, "prism, tet, ts passed on");
      seen[p][t]++;
    end
    for (int p = 1; p <= 6; p++)
      for (int t = 1; t <= 4; t++)
        check(seen[p][t] > 0, $sformatf("prism %0d tetrahedron %0d never tested", p, t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
