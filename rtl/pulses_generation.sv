// pulses_generation: gate pulses of the four legs.
//
// A counter runs from 0 to T_s-1 over each switching period. At the last
// count the block takes a fresh set of switch-on/switch-off instants and
// the period length from on_off_times, so a new set always starts a whole
// period and the pulses stay symmetrical about the period centre even when
// the reference or the switching frequency changes. Leg x is on (switching
// function S_x = 1) while t_on[x] <= count < t_off[x]. Each S_x goes
// through a dead_time stage that produces the upper and lower gate signal
// with DEAD_TIME cycles of dead time.
//
// The counter/compare scheme and the 4 us dead time follow the document;
// the period-boundary update, the registered S_x and the period_start
// strobe are this design's. Legs are indexed a, b, c, n = 0..3.
//
// Timing: S_x is registered, so a gate edge lies 2 cycles (switch-off) or
// DEAD_TIME+2 cycles (switch-on) after the count at which S_x changes.
// Reset (synchronous, active high) turns all eight gates off; the first
// period after reset has all legs off until fresh instants are taken.
module pulses_generation
  import svm_pkg::*;
#(
  parameter int unsigned DEAD_TIME = 400
) (
  input  logic       clk,
  input  logic       rst,
  input  cyc_t       ts,
  input  cyc_t       t_on  [4],
  input  cyc_t       t_off [4],
  output logic [3:0] gate_hi,
  output logic [3:0] gate_lo,
  output logic       period_start
);
  cyc_t       cnt, ts_q;
  cyc_t       on_q  [4];
  cyc_t       off_q [4];
  logic [3:0] s;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt          <= '0;
      ts_q         <= cyc_t'(2);
      period_start <= 1'b0;
      s            <= '0;
      for (int l = 0; l < 4; l++) begin
        on_q[l]  <= '0;
        off_q[l] <= '0;
      end
    end else begin
      if (cnt >= ts_q - 1'b1) begin
        cnt          <= '0;
        ts_q         <= ts;
        period_start <= 1'b1;
        for (int l = 0; l < 4; l++) begin
          on_q[l]  <= t_on[l];
          off_q[l] <= t_off[l];
        end
      end else begin
        cnt          <= cnt + 1'b1;
        period_start <= 1'b0;
      end
      for (int l = 0; l < 4; l++)
        s[l] <= (cnt >= on_q[l]) && (cnt < off_q[l]);
    end
  end

  for (genvar l = 0; l < 4; l++) begin : g_leg
    dead_time #(.DEAD_TIME(DEAD_TIME)) u_dt (
      .clk     (clk),
      .rst     (rst),
      .s       (s[l]),
      .gate_hi (gate_hi[l]),
      .gate_lo (gate_lo[l])
    );
  end
endmodule
