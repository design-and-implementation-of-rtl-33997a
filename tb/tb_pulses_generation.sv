// tb_pulses_generation: drives random switch-on/switch-off instants and
// periods (with a short dead time of 5 cycles) and compares every gate,
// every cycle, with the waveform worked out here: with the cycle in which
// period_start is high as cycle 0 and the instants taken at the end of the
// previous period, the upper gate is on for on+DT+2 <= c < off+2 and the
// lower gate for c < on+2 or c >= off+DT+2. Also checks the period length,
// that the two gates of a leg are never on together, and counts the dead
// times seen.
module tb_pulses_generation;
  import svm_pkg::*;
  localparam int DT = 5;
  logic clk = 1'b0, rst = 1'b1;
  cyc_t ts;
  cyc_t t_on [4];
  cyc_t t_off [4];
  logic [3:0] gate_hi, gate_lo;
  logic period_start;
  int checks = 0, failures = 0, dead_gaps = 0;

  always #5 clk = ~clk;

  pulses_generation #(.DEAD_TIME(DT)) dut (.clk(clk), .rst(rst), .ts(ts), .t_on(t_on), .t_off(t_off),
    .gate_hi(gate_hi), .gate_lo(gate_lo), .period_start(period_start));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Values applied for the next period, and those in force now.
  int nx_ts, nx_on [4], nx_off [4];
  int cur_ts, cur_on [4], cur_off [4];

  task automatic pick_next();
    nx_ts = $urandom_range(30, 120);
    for (int l = 0; l < 4; l++) begin
      nx_on[l]  = $urandom_range(0, nx_ts / 2);
      nx_off[l] = $urandom_range(nx_on[l], nx_ts - DT - 4);
      if (nx_off[l] < nx_on[l]) nx_off[l] = nx_on[l];
    end
    ts = cyc_t'(nx_ts);
    for (int l = 0; l < 4; l++) begin t_on[l] = cyc_t'(nx_on[l]); t_off[l] = cyc_t'(nx_off[l]); end
  endtask

  initial begin
    int c, nper;
    pick_next();
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // Skip the first period after reset (instants not yet taken).
    @(posedge clk iff period_start);
    nper = 0;
    while (nper < 400) begin
      // Now in cycle 0 of a period that uses the values picked before.
      cur_ts = nx_ts; cur_on = nx_on; cur_off = nx_off;
      #1 pick_next();
      c = 0;
      do begin
        for (int l = 0; l < 4; l++) begin
          bit eh, el;
          if (cur_on[l] >= cur_off[l]) begin eh = 0; el = 1; end
          else begin
            eh = (c >= cur_on[l] + DT + 2) && (c < cur_off[l] + 2);
            el = (c < cur_on[l] + 2) || (c >= cur_off[l] + DT + 2);
          end
          if (nper > 0) begin
            check(gate_hi[l] == eh && gate_lo[l] == el,
                  $sformatf("period %0d cycle %0d leg %0d: hi %b lo %b, expected %b %b (on %0d off %0d)",
                            nper, c, l, gate_hi[l], gate_lo[l], eh, el, cur_on[l], cur_off[l]));
          end
          if (!gate_hi[l] && !gate_lo[l] && c == cur_on[l] + 2 && cur_on[l] < cur_off[l]) dead_gaps++;
          check(!(gate_hi[l] && gate_lo[l]), "both gates of a leg on");
        end
        @(posedge clk); #1;
        c++;
      end while (!period_start);
      if (nper > 0) check(c == cur_ts, $sformatf("period length %0d, expected %0d", c, cur_ts));
      nper++;
    end
    check(dead_gaps > 100, $sformatf("only %0d dead times seen", dead_gaps));
    // Reset turns every gate off.
    rst <= 1'b1;
    @(posedge clk); @(posedge clk); #1;
    check(gate_hi == 4'b0 && gate_lo == 4'b0, "gates off in reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
