// dead_time: complementary gate pair with dead time for one inverter leg.
//
// From the switching function s of a leg it drives the upper gate (on when
// s = 1) and the lower gate (on when s = 0). After every change of s both
// gates are held off for DEAD_TIME clock cycles before the new one turns on,
// so the two switches of a leg are never on together. A pulse of s shorter
// than DEAD_TIME never reaches its gate.
//
// The 4 us dead time is the document's (400 cycles at 100 MHz); the
// counter form is this design's.
//
// Timing: one cycle after s changes, the gate that was on turns off; the
// other turns on DEAD_TIME cycles later, so both are off for exactly
// DEAD_TIME cycles. Reset (synchronous, active high) turns both gates off;
// the gate selected by s turns on DEAD_TIME cycles after reset is
// released.
module dead_time #(
  parameter int unsigned DEAD_TIME = 400
) (
  input  logic clk,
  input  logic rst,
  input  logic s,
  output logic gate_hi,
  output logic gate_lo
);
  localparam int CW = $clog2(DEAD_TIME + 1);

  logic          s_q;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_q     <= 1'b0;
      cnt     <= CW'(DEAD_TIME - 1);
      gate_hi <= 1'b0;
      gate_lo <= 1'b0;
    end else begin
      s_q <= s;
      if (s != s_q) begin
        cnt     <= CW'(DEAD_TIME - 1);
        gate_hi <= 1'b0;
        gate_lo <= 1'b0;
      end else if (cnt != '0) begin
        cnt <= cnt - 1'b1;
      end else begin
        gate_hi <= s_q;
        gate_lo <= ~s_q;
      end
    end
  end

  initial assert (DEAD_TIME >= 1) else $error("dead_time: DEAD_TIME must be at least 1");

  // The two gates of a leg are never on together.
  a_no_shoot_through: assert property (@(posedge clk) !(gate_hi && gate_lo));
endmodule
