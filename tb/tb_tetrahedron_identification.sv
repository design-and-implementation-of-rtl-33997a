// tb_tetrahedron_identification: random phase voltages (with a zero-
// sequence part, so that all four tetrahedrons occur) are transformed to
// alpha-beta-gamma here in floating point. The expected prism comes from the
// ranking of the phases and the expected tetrahedron is one plus the
// number of phases that are not positive. Points with a phase or a phase
// difference close to zero are skipped.
module tb_tetrahedron_identification;
  import svm_pkg::*;
  logic clk = 1'b0;
  abg_t vabg, vabg_o;
  prism_t prism, prism_o;
  tet_t tet;
  int checks = 0, failures = 0;
  int seen [5];

  always #5 clk = ~clk;

  tetrahedron_identification dut (.clk(clk), .prism(prism), .vabg(vabg),
    .tet(tet), .prism_o(prism_o), .vabg_o(vabg_o));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real absr(input real x); return x < 0 ? -x : x; endfunction

  initial begin
    for (int k = 0; k < 4000; k++) begin
      real v [3];
      real al, be, ga, m;
      int p, t;
      for (int i = 0; i < 3; i++) v[i] = (real'($urandom_range(0, 1600)) - 800.0) / 1000.0;
      m = 1.0;
      for (int i = 0; i < 3; i++) begin
        if (absr(v[i]) < m) m = absr(v[i]);
        if (absr(v[i] - v[(i+1)%3]) < m) m = absr(v[i] - v[(i+1)%3]);
      end
      if (m < 0.01) continue;
      if      (v[0] > v[1] && v[1] > v[2]) p = 1;
      else if (v[1] > v[0] && v[0] > v[2]) p = 2;
      else if (v[1] > v[2] && v[2] > v[0]) p = 3;
      else if (v[2] > v[1] && v[1] > v[0]) p = 4;
      else if (v[2] > v[0] && v[0] > v[1]) p = 5;
      else                                 p = 6;
      t = 1;
      for (int i = 0; i < 3; i++) if (v[i] <= 0.0) t++;
      al = $sqrt(2.0/3.0) * (v[0] - v[1]/2.0 - v[2]/2.0);
      be = (v[1] - v[2]) / $sqrt(2.0);
      ga = (v[0] + v[1] + v[2]) / $sqrt(3.0);
      vabg.alpha = volt_t'($rtoi(al * 16384.0));
      vabg.beta  = volt_t'($rtoi(be * 16384.0));
      vabg.gamma = volt_t'($rtoi(ga * 16384.0));
      prism = 3'(p);
      @(posedge clk); #1;
      check(tet == 3'(t), $sformatf("v=(%f,%f,%f) prism %0d: tet %0d expected %0d", v[0], v[1], v[2], p, tet, t));
      check(prism_o == prism && vabg_o == vabg, "prism and reference passed on");
      seen[t]++;
    end
    for (int t = 1; t <= 4; t++) check(seen[t] > 0, $sformatf("tetrahedron %0d never seen", t));
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
