// tb_switching_frequency_select: every value of choice, in random order,
// must give the period of its frequency (00 1 kHz, 01 2 kHz, else 5 kHz at
// a 100 MHz clock) three cycles later.
module tb_switching_frequency_select;
  import svm_pkg::*;
  logic clk = 1'b0;
  logic [1:0] choice = 2'b00;
  cyc_t ts;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  switching_frequency_select dut (.clk(clk), .choice(choice), .ts(ts));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int prev_ts;
    repeat (4) @(posedge clk);
    prev_ts = 100000;
    for (int k = 0; k < 64; k++) begin
      int exp_ts;
      logic [1:0] ch;
      ch = (k < 4) ? 2'(k) : 2'($urandom_range(0, 3));
      exp_ts = (ch == 2'b00) ? 100000 : (ch == 2'b01) ? 50000 : 20000;
      @(negedge clk) choice = ch;
      @(posedge clk); @(posedge clk); #1;
      check(ts == cyc_t'(prev_ts), $sformatf("ts %0d changed before the third cycle (previous %0d)", ts, prev_ts));
      @(posedge clk); #1;
      check(ts == cyc_t'(exp_ts), $sformatf("choice %b: ts %0d expected %0d", ch, ts, exp_ts));
      prev_ts = exp_ts;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
