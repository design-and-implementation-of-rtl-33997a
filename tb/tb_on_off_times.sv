// tb_on_off_times: random durations for every prism and tetrahedron. The
// expected instants come from the switching-vector order of the
// symmetrical sequence, listed here state by state (v1, v2, v3 for each
// prism and tetrahedron; 0000 before and 1111 after): a leg switches on in
// the first segment whose state has it set, at t4/4 plus half of the
// active times before that segment, and switches off at T_s minus that.
module tb_on_off_times;
  import svm_pkg::*;
  logic clk = 1'b0;
  prism_t prism;
  tet_t tet;
  cyc_t t1, t2, t3, t4, ts, ts_o;
  cyc_t t_on [4];
  cyc_t t_off [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  on_off_times dut (.clk(clk), .prism(prism), .tet(tet), .t1(t1), .t2(t2), .t3(t3), .t4(t4),
    .ts(ts), .t_on(t_on), .t_off(t_off), .ts_o(ts_o));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Switching states v1 v2 v3 (S_a S_b S_c S_n) per prism (row) and
  // tetrahedron (group of three).
  logic [3:0] seq [6][4][3] = '{
    '{'{4'b1000, 4'b1100, 4'b1110}, '{4'b1000, 4'b1100, 4'b1101}, '{4'b1000, 4'b1001, 4'b1101}, '{4'b0001, 4'b1001, 4'b1101}},
    '{'{4'b0100, 4'b1100, 4'b1110}, '{4'b0100, 4'b1100, 4'b1101}, '{4'b0100, 4'b0101, 4'b1101}, '{4'b0001, 4'b0101, 4'b1101}},
    '{'{4'b0100, 4'b0110, 4'b1110}, '{4'b0100, 4'b0110, 4'b0111}, '{4'b0100, 4'b0101, 4'b0111}, '{4'b0001, 4'b0101, 4'b0111}},
    '{'{4'b0010, 4'b0110, 4'b1110}, '{4'b0010, 4'b0110, 4'b0111}, '{4'b0010, 4'b0011, 4'b0111}, '{4'b0001, 4'b0011, 4'b0111}},
    '{'{4'b0010, 4'b1010, 4'b1110}, '{4'b0010, 4'b1010, 4'b1011}, '{4'b0010, 4'b0011, 4'b1011}, '{4'b0001, 4'b0011, 4'b1011}},
    '{'{4'b1000, 4'b1010, 4'b1110}, '{4'b1000, 4'b1010, 4'b1011}, '{4'b1000, 4'b1001, 4'b1011}, '{4'b0001, 4'b1001, 4'b1011}}
  };

  initial begin
    int periods [3] = '{100000, 50000, 20000};
    for (int k = 0; k < 3000; k++) begin
      int p, t, T, a, b, c, z;
      int ea [4];
      int act [3];
      p = (k % 6) + 1;
      t = ((k / 6) % 4) + 1;
      T = periods[(k / 24) % 3];
      a = $urandom_range(0, T / 2);
      b = $urandom_range(0, T - a);
      c = $urandom_range(0, T - a - b);
      z = T - a - b - c;
      act = '{a, b, c};
      prism = 3'(p); tet = 3'(t);
      t1 = cyc_t'(a); t2 = cyc_t'(b); t3 = cyc_t'(c); t4 = cyc_t'(z);
      ts = cyc_t'(T);
      for (int leg = 0; leg < 4; leg++) begin
        int first, acc;
        first = 3;
        for (int s = 2; s >= 0; s--) if (seq[p-1][t-1][s][3-leg]) first = s;
        acc = 0;
        for (int s = 0; s < first; s++) acc += act[s];
        ea[leg] = z / 4 + acc / 2;
      end
      @(posedge clk); #1;
      for (int leg = 0; leg < 4; leg++) begin
        // Halving a sum and summing halves may differ by one cycle.
        check(int'(t_on[leg]) - ea[leg] <= 1 && ea[leg] - int'(t_on[leg]) <= 1,
              $sformatf("p%0d t%0d leg %0d: on %0d expected %0d", p, t, leg, t_on[leg], ea[leg]));
        check(int'(t_off[leg]) == T - int'(t_on[leg]),
              $sformatf("p%0d t%0d leg %0d: off %0d, on %0d, T %0d", p, t, leg, t_off[leg], t_on[leg], T));
      end
      check(ts_o == ts, "ts passed on");
    end
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
