// tb_load_current: the controller at its default parameters drives a
// behavioural four-leg inverter (60 V link) with a 500 ohm / 0.4 H load,
// at the six operating points 1, 2 and 5 kHz x balanced / unbalanced.
//
// After half a reference period to settle, the phase currents are sampled
// every 10 us over one full reference period. A discrete Fourier sum at
// the reference frequency gives the fundamental amplitude of each phase,
// and the rest of the RMS value gives the distortion (THD). Expected
// amplitude, worked out here: 30 V / |500 + j*2*pi*50*0.4| = 58.2 mA per
// phase, 29.1 mA for phase a in unbalanced mode. Checks:
//   * each fundamental within 5 % above and, below, 3 % plus the loss the
//     uncompensated dead time causes (about 2*(4/pi)*(DT/Ts)*60 V/30 V:
//     3 % at 1 kHz, 13 % at 5 kHz);
//   * unbalanced: phase a / phase b between 0.45 and 0.55;
//   * in each mode the THD falls from 1 kHz to 2 kHz to 5 kHz.
module tb_load_current;
  localparam real PI    = 3.14159265358979323846;
  localparam int  NSAMP = 600 * 3333 / 1000;   // 10 us samples in one period
  localparam real FREF  = 100.0e6 / (600.0 * 3333.0);

  logic clk = 1'b0, reset = 1'b1, Mode = 1'b0;
  logic [1:0] Choice = 2'b00;
  logic sa, sa_bar, sb, sb_bar, sc, sc_bar, sn, sn_bar;
  real ia, ib, ic;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  svm_top_level dut (.clk_p(clk), .reset(reset), .Choice(Choice), .Mode(Mode),
    .sa(sa), .sa_bar(sa_bar), .sb(sb), .sb_bar(sb_bar),
    .sc(sc), .sc_bar(sc_bar), .sn(sn), .sn_bar(sn_bar));

  four_leg_inverter_rl_model load (.clk(clk),
    .gate_hi({sn, sc, sb, sa}), .gate_lo({sn_bar, sc_bar, sb_bar, sa_bar}),
    .ia(ia), .ib(ib), .ic(ic));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real thd [2][3];   // [mode][frequency 1k,2k,5k]

  task automatic measure(input int mode, input int f);
    real s_c [3], s_s [3], s_q [3], amp [3], th [3], iexp [3];
    real zmag, ph, x, lossf;
    // Allowed shortfall: 3 % plus the uncompensated dead time, whose
    // voltage error is about (4/pi)(DT/Ts) v_dc per leg, counted for the
    // phase leg and the neutral leg against 30 V.
    lossf = 0.03 + 2.0 * (4.0 / PI) * (400.0 / ((f == 0) ? 100000.0 : (f == 1) ? 50000.0 : 20000.0)) * 60.0 / 30.0;
    for (int k = 0; k < 3; k++) begin s_c[k] = 0.0; s_s[k] = 0.0; s_q[k] = 0.0; end
    for (int n = 0; n < NSAMP; n++) begin
      repeat (1000) @(posedge clk);
      #1;
      ph = 2.0 * PI * FREF * real'(n) * 10.0e-6;
      for (int k = 0; k < 3; k++) begin
        x = (k == 0) ? ia : (k == 1) ? ib : ic;
        s_c[k] += x * $cos(ph);
        s_s[k] += x * $sin(ph);
        s_q[k] += x * x;
      end
    end
    zmag = $sqrt(500.0 * 500.0 + (2.0 * PI * FREF * 0.4) ** 2);
    for (int k = 0; k < 3; k++) begin
      real rms2, fund2;
      amp[k]  = 2.0 / real'(NSAMP) * $sqrt(s_c[k] ** 2 + s_s[k] ** 2);
      rms2    = s_q[k] / real'(NSAMP);
      fund2   = amp[k] * amp[k] / 2.0;
      th[k]   = $sqrt((rms2 > fund2 ? rms2 - fund2 : 0.0) / fund2);
      iexp[k] = ((k == 0 && mode == 1) ? 15.0 : 30.0) / zmag;
      check(amp[k] > (1.0 - lossf) * iexp[k] && amp[k] < 1.05 * iexp[k],
            $sformatf("mode %0d f%0d phase %0d: fundamental %f mA, expected %f mA", mode, f, k, amp[k] * 1e3, iexp[k] * 1e3));
    end
    if (mode == 1) check(amp[0] / amp[1] > 0.45 && amp[0] / amp[1] < 0.55,
                         $sformatf("unbalanced: ia/ib = %f", amp[0] / amp[1]));
    thd[mode][f] = th[1];
    $display("%s, %0d kHz: fundamentals %.2f %.2f %.2f mA, THD(b) %.3f %%",
             mode ? "unbalanced" : "balanced", (f == 0) ? 1 : (f == 1) ? 2 : 5,
             amp[0] * 1e3, amp[1] * 1e3, amp[2] * 1e3, th[1] * 100.0);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    reset <= 1'b0;
    for (int mode = 0; mode < 2; mode++)
      for (int f = 0; f < 3; f++) begin
        Choice <= (f == 0) ? 2'b00 : (f == 1) ? 2'b01 : 2'b11;
        Mode   <= mode[0];
        repeat (300 * 3333) @(posedge clk);   // settle: half a period
        measure(mode, f);
      end
    for (int mode = 0; mode < 2; mode++)
      check(thd[mode][0] > thd[mode][1] && thd[mode][1] > thd[mode][2],
            $sformatf("mode %0d: THD does not fall with frequency (%f %f %f)",
                      mode, thd[mode][0], thd[mode][1], thd[mode][2]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
