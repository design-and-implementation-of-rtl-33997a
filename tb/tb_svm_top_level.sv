// tb_svm_top_level: end-to-end run of the modulator at its default
// parameters (100 MHz clock, 600-sample 50 Hz reference, 4 us dead time).
//
// Schedule: reset, then one full 50 Hz reference period at each of the six
// operating points 5/2/1 kHz x balanced/unbalanced (phase a at half
// amplitude), then a short run with choice = 10 (also 5 kHz).
//
// For every switching period the gate pulses are measured and compared
// with the reference, worked out here from sin(2*pi*i/600) for the sample
// index i in use:
//   * the period length equals the selected T_s;
//   * each upper-gate pulse is centred in the period (symmetrical
//     sequence, +/-2 cycles);
//   * the leg duty d_x = (upper on-time + dead time) / T_s satisfies
//     d_x - d_n = v_x* / v_dc within 0.012 for x = a, b, c;
//   * every gap with both gates of a leg off lasts exactly the dead time,
//     and the two gates are never on together.
// It also counts how often each prism, each tetrahedron, each switching
// frequency, each mode and the dead time occurred, and fails for any of
// prisms 1-6, tetrahedrons 2-3, the three frequencies, the two modes or
// the dead time that never did. (A sine reference whose phases sum to a
// small value never enters tetrahedrons 1 and 4; those are covered by the
// block testbenches.)
module tb_svm_top_level;
  localparam real PI  = 3.14159265358979323846;
  localparam int  DT  = 400;
  localparam real AMP = 8192.0 / 16384.0;

  logic clk = 1'b0, reset = 1'b1, Mode = 1'b0;
  logic [1:0] Choice = 2'b11;
  logic sa, sa_bar, sb, sb_bar, sc, sc_bar, sn, sn_bar;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  svm_top_level dut (.clk_p(clk), .reset(reset), .Choice(Choice), .Mode(Mode),
    .sa(sa), .sa_bar(sa_bar), .sb(sb), .sb_bar(sb_bar),
    .sc(sc), .sc_bar(sc_bar), .sn(sn), .sn_bar(sn_bar));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic [3:0] hi, lo;
  assign hi = {sn, sc, sb, sa};
  assign lo = {sn_bar, sc_bar, sb_bar, sa_bar};

  // Mechanism counters.
  int prism_seen [7];
  int tet_seen [5];
  int freq_seen [3];
  int mode_seen [2];
  int dead_seen = 0, periods = 0;

  // Dead-time monitor: length of every both-off gap of a leg.
  int gap [4];
  always @(posedge clk) if (!reset) begin
    for (int l = 0; l < 4; l++) begin
      if (hi[l] && lo[l]) check(0, $sformatf("leg %0d: both gates on", l));
      if (!hi[l] && !lo[l]) gap[l]++;
      else begin
        if (gap[l] > 0 && periods > 1) begin
          check(gap[l] == DT, $sformatf("leg %0d: dead time %0d cycles", l, gap[l]));
          dead_seen++;
        end
        gap[l] = 0;
      end
    end
  end

  // Per-period measurement.
  int c = 0, rise [4], fall [4], hcnt [4];
  int ts_cur, idx_cur, mode_cur, prism_cur, tet_cur;
  bit measuring = 0;

  function automatic int ts_of(input logic [1:0] ch);
    return (ch == 2'b00) ? 100000 : (ch == 2'b01) ? 50000 : 20000;
  endfunction

  task automatic close_period();
    real d [4];
    real ref_v [3];
    real ph;
    check(c == ts_cur, $sformatf("period of %0d cycles, expected %0d", c, ts_cur));
    for (int l = 0; l < 4; l++) begin
      check(hcnt[l] > 0, $sformatf("leg %0d: no upper pulse", l));
      // Centre of the switching function pulse: (rise-DT-2 + fall-2)/2.
      check((rise[l] - DT - 2 + fall[l] - 2) - ts_cur <= 4 && ts_cur - (rise[l] - DT - 2 + fall[l] - 2) <= 4,
            $sformatf("leg %0d pulse %0d..%0d not centred in %0d", l, rise[l], fall[l], ts_cur));
      d[l] = real'(hcnt[l] + DT) / real'(ts_cur);
    end
    ph = 2.0 * PI * real'(idx_cur) / 600.0;
    ref_v[0] = AMP * $sin(ph) * (mode_cur != 0 ? 0.5 : 1.0);
    ref_v[1] = AMP * $sin(ph - 2.0 * PI / 3.0);
    ref_v[2] = AMP * $sin(ph - 4.0 * PI / 3.0);
    for (int x = 0; x < 3; x++) begin
      real e;
      e = (d[x] - d[3]) - ref_v[x];
      check(e < 0.012 && e > -0.012,
            $sformatf("i=%0d leg %0d: d_x-d_n %f, reference %f", idx_cur, x, d[x] - d[3], ref_v[x]));
    end
    prism_seen[prism_cur]++;
    tet_seen[tet_cur]++;
    freq_seen[(ts_cur == 100000) ? 0 : (ts_cur == 50000) ? 1 : 2]++;
    mode_seen[mode_cur]++;
  endtask

  always @(posedge clk) begin
    #1;
    if (dut.u_pulse.period_start) begin
      if (measuring) close_period();
      periods++;
      // The instants now in force were computed from the sample that was
      // current a few cycles ago; the index has almost surely not moved.
      measuring = (periods > 2);
      c = 0;
      ts_cur    = int'(dut.u_pulse.ts_q);
      idx_cur   = int'(dut.u_ref.idx);
      mode_cur  = int'(Mode);
      prism_cur = int'(dut.prism_s);
      tet_cur   = int'(dut.tet_s);
      for (int l = 0; l < 4; l++) begin rise[l] = -1; fall[l] = -1; hcnt[l] = 0; end
    end
    if (measuring) begin
      for (int l = 0; l < 4; l++) begin
        if (hi[l]) begin
          hcnt[l]++;
          if (rise[l] < 0) rise[l] = c;
          fall[l] = c + 1;
        end
      end
    end
    c++;
  end

  task automatic run_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    run_cycles(5);
    #1 check({hi, lo} == 8'b0, "all gates off in reset");
    reset <= 1'b0;
    // The six operating points of the experiments: 1, 2 and 5 kHz, each
    // balanced and unbalanced, one full reference period (600 samples x
    // 3333 cycles) each. Settings change only at a switching-period
    // boundary so that no measured period mixes two settings.
    for (int op = 0; op < 6; op++) begin
      logic [1:0] ch;
      ch = (op / 2 == 0) ? 2'b11 : (op / 2 == 1) ? 2'b01 : 2'b00;
      @(posedge clk iff dut.u_pulse.period_start);
      Choice <= ch; Mode <= op[0];
      run_cycles(600 * 3333 + 100000);
    end
    // Choice 10 is one of the "remaining combinations": 5 kHz.
    @(posedge clk iff dut.u_pulse.period_start);
    Choice <= 2'b10; Mode <= 1'b0;
    run_cycles(200000);
    for (int p = 1; p <= 6; p++) check(prism_seen[p] > 0, $sformatf("prism %0d never used", p));
    for (int t = 2; t <= 3; t++) check(tet_seen[t] > 0, $sformatf("tetrahedron %0d never used", t));
    for (int f = 0; f < 3; f++) check(freq_seen[f] > 0, $sformatf("frequency %0d never used", f));
    for (int m = 0; m < 2; m++) check(mode_seen[m] > 0, $sformatf("mode %0d never used", m));
    check(dead_seen > 0, "dead time never seen");
    $display("periods measured: 1 kHz %0d, 2 kHz %0d, 5 kHz %0d; balanced %0d, unbalanced %0d",
             freq_seen[0], freq_seen[1], freq_seen[2], mode_seen[0], mode_seen[1]);
    $display("prisms 1-6: %0d %0d %0d %0d %0d %0d; tetrahedrons 1-4: %0d %0d %0d %0d; dead times %0d",
             prism_seen[1], prism_seen[2], prism_seen[3], prism_seen[4], prism_seen[5], prism_seen[6],
             tet_seen[1], tet_seen[2], tet_seen[3], tet_seen[4], dead_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (14_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
