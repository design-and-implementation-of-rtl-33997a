// tb_prism_determination: random reference vectors at known angles; the
// expected prism is the 60-degree sector of the angle atan2(beta, alpha)
// (prism 1 = 0..60 degrees, counterclockwise). Vectors within a small
// margin of a sector edge are skipped. Also checks that alpha/beta/gamma
// are passed on unchanged and that every prism was seen.
module tb_prism_determination;
  import svm_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  abg_t vabg, vabg_o;
  prism_t prism;
  int checks = 0, failures = 0;
  int seen [7];

  always #5 clk = ~clk;

  prism_determination dut (.clk(clk), .vabg(vabg), .prism(prism), .vabg_o(vabg_o));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 3000; k++) begin
      real ang, mag, deg, edge_dist;
      int exp_p;
      ang = 2.0 * PI * $urandom_range(0, 35999) / 36000.0;
      mag = $urandom_range(200, 1100) / 1000.0;
      deg = ang * 180.0 / PI;
      exp_p = int'($floor(deg / 60.0)) + 1;
      edge_dist = deg - 60.0 * $floor(deg / 60.0);
      vabg.alpha = volt_t'($rtoi(mag * $cos(ang) * 16384.0));
      vabg.beta  = volt_t'($rtoi(mag * $sin(ang) * 16384.0));
      vabg.gamma = volt_t'(int'($urandom_range(0, 20000)) - 10000);
      @(posedge clk); #1;
      if (edge_dist > 0.2 && edge_dist < 59.8) begin
        check(prism == 3'(exp_p), $sformatf("angle %f deg: prism %0d expected %0d", deg, prism, exp_p));
        seen[exp_p]++;
      end
      check(vabg_o == vabg, "alpha/beta/gamma passed on");
    end
    for (int p = 1; p <= 6; p++) check(seen[p] > 0, $sformatf("prism %0d never seen", p));
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
