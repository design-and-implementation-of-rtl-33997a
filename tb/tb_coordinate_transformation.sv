// tb_coordinate_transformation: random three-phase voltages through the
// abc -> alpha-beta-gamma transformation, compared with the transformation
// evaluated here in floating point (within 3 LSB), plus the sixteen
// switching states of the inverter, whose coordinates are known in closed
// form (e.g. state 1000 -> (sqrt(2/3), 0, 1/sqrt3) v_dc).
module tb_coordinate_transformation;
  import svm_pkg::*;
  logic clk = 1'b0;
  abc_t vabc;
  abg_t vabg;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  coordinate_transformation dut (.clk(clk), .vabc(vabc), .vabg(vabg));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input volt_t got, input real want, input real tol);
    real d;
    d = real'(got) - want;
    return (d <= tol) && (d >= -tol);
  endfunction

  task automatic apply(input real a, input real b, input real c);
    real ea, eb, eg;
    vabc.va = volt_t'($rtoi(a * 16384.0));
    vabc.vb = volt_t'($rtoi(b * 16384.0));
    vabc.vc = volt_t'($rtoi(c * 16384.0));
    a = real'(vabc.va); b = real'(vabc.vb); c = real'(vabc.vc);
    ea = $sqrt(2.0/3.0) * (a - b/2.0 - c/2.0);
    eb = (b - c) / $sqrt(2.0);
    eg = (a + b + c) / $sqrt(3.0);
    @(posedge clk); #1;
    check(near(vabg.alpha, ea, 3.0), $sformatf("alpha %0d expected %f", vabg.alpha, ea));
    check(near(vabg.beta,  eb, 3.0), $sformatf("beta %0d expected %f",  vabg.beta,  eb));
    check(near(vabg.gamma, eg, 3.0), $sformatf("gamma %0d expected %f", vabg.gamma, eg));
  endtask

  initial begin
    // Switching states S_a S_b S_c S_n -> phase-to-neutral voltages.
    for (int s = 0; s < 16; s++) begin
      real a, b, c, n;
      a = s[3]; b = s[2]; c = s[1]; n = s[0];
      apply(a - n, b - n, c - n);
    end
    // State 1000 in closed form.
    apply(1.0, 0.0, 0.0);
    check(near(vabg.alpha, 16384.0 * 0.81650, 3.0) && near(vabg.beta, 0.0, 1.0)
          && near(vabg.gamma, 16384.0 * 0.57735, 3.0), "state 1000 closed form");
    for (int k = 0; k < 2000; k++)
      apply((real'($urandom_range(0, 1800)) - 900.0) / 1000.0,
            (real'($urandom_range(0, 1800)) - 900.0) / 1000.0,
            (real'($urandom_range(0, 1800)) - 900.0) / 1000.0);
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
