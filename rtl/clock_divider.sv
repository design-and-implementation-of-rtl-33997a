// clock_divider: sample-rate strobe for the reference table.
//
// The 100 MHz board clock is divided down to the rate at which the
// reference generator steps through its table. With a 600-sample table and a
// 50 Hz reference this is 30 kHz, so the default divide ratio is
// 100e6 / 30e3 = 3333 (3333.3 rounded, giving 50.005 Hz).
//
// Rather than a second clock, the divider produces a one-cycle enable
// strobe, `tick`, every DIV cycles; everything stays in the one clock
// domain. The divide-by-counter follows the document; the strobe form, the
// ratio rounding and the synchronous active-high reset are this design's.
//
// Timing: after reset is released the first tick comes DIV cycles later,
// then one every DIV cycles.
module clock_divider #(
  parameter int unsigned DIV = 3333
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

  initial assert (DIV >= 2) else $error("clock_divider: DIV must be at least 2");
endmodule
