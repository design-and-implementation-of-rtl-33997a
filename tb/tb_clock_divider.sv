// tb_clock_divider: checks that the divider strobes exactly once every DIV
// cycles, that the first strobe comes DIV cycles after reset, and that the
// strobe is one cycle wide. Runs a short divide ratio and the default one.
module tb_clock_divider;
  logic clk = 1'b0, rst = 1'b1;
  logic tick7, tickd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_divider #(.DIV(7)) dut7 (.clk(clk), .rst(rst), .tick(tick7));
  clock_divider             dutd (.clk(clk), .rst(rst), .tick(tickd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n = 0, last7 = -1, lastd = -1, cnt7 = 0, cntd = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    forever begin
      @(posedge clk); #1;
      n++;
      if (tick7) begin
        if (last7 < 0) check(n == 7, $sformatf("first tick (DIV=7) after %0d cycles", n));
        else           check(n - last7 == 7, $sformatf("tick spacing %0d, expected 7", n - last7));
        last7 = n; cnt7++;
      end
      if (tickd) begin
        if (lastd < 0) check(n == 3333, $sformatf("first tick (DIV=3333) after %0d cycles", n));
        else           check(n - lastd == 3333, $sformatf("tick spacing %0d, expected 3333", n - lastd));
        lastd = n; cntd++;
      end
      if (n == 20000) begin
        check(cnt7 == 20000 / 7, $sformatf("%0d ticks of DIV=7 in 20000 cycles", cnt7));
        check(cntd == 20000 / 3333, $sformatf("%0d ticks of DIV=3333 in 20000 cycles", cntd));
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
