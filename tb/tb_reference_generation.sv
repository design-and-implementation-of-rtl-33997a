// tb_reference_generation: steps the table index with single-cycle ticks
// and compares the three outputs with AMP*sin(2*pi*i/600 - k*2*pi/3)
// computed here in floating point (within 1 LSB), in balanced mode and with
// phase a halved in unbalanced mode. Also checks the index wraps after
// 600 samples.
module tb_reference_generation;
  import svm_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int  N  = 600;
  localparam real A  = 8192.0;

  logic clk = 1'b0, rst = 1'b1, tick = 1'b0, mode = 1'b0;
  logic [9:0] idx;
  abc_t vabc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reference_generation dut (.clk(clk), .rst(rst), .tick(tick), .mode(mode), .idx(idx), .vabc(vabc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input volt_t got, input real want);
    real d;
    d = real'(got) - want;
    return (d < 1.01) && (d > -1.01);
  endfunction

  task automatic check_sample(input int i, input bit unbal);
    real ea, eb, ec;
    ea = A * $sin(2.0 * PI * i / N) * (unbal ? 0.5 : 1.0);
    eb = A * $sin(2.0 * PI * i / N - 2.0 * PI / 3.0);
    ec = A * $sin(2.0 * PI * i / N - 4.0 * PI / 3.0);
    check(idx == 10'(i), $sformatf("index %0d, expected %0d", idx, i));
    check(near(vabc.va, ea), $sformatf("i=%0d va=%0d expected %f", i, vabc.va, ea));
    check(near(vabc.vb, eb), $sformatf("i=%0d vb=%0d expected %f", i, vabc.vb, eb));
    check(near(vabc.vc, ec), $sformatf("i=%0d vc=%0d expected %f", i, vabc.vc, ec));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int pass = 0; pass < 2; pass++) begin
      mode <= pass[0];
      for (int i = 0; i < N; i++) begin
        repeat (2) @(posedge clk);   // output settles on the sample
        #1 check_sample(i, pass[0]);
        @(negedge clk) tick = 1'b1;
        @(negedge clk) tick = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
