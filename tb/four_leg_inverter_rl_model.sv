// four_leg_inverter_rl_model: behavioural model (not synthesizable) of a
// two-level four-leg inverter feeding a star-connected R-L load whose star
// point is tied to the fourth leg.
//
// Each leg's output sits at v_dc when its upper gate is on and at 0 when
// its lower gate is on. When both gates are off (dead time), the
// freewheeling diodes decide: current leaving the leg holds it at 0,
// current entering it holds it at v_dc. Phase x of the load sees
// v_x - v_n and follows L di_x/dt = (v_x - v_n) - R i_x, integrated by the
// forward Euler rule once per clock period TSTEP. The current leaving the
// neutral leg is -(ia + ib + ic).
//
// Interface: the eight gate signals in, three phase currents (amperes, as
// reals) out, updated on every rising clock edge. Defaults: 60 V link,
// 500 ohm, 0.4 H, 10 ns step (100 MHz clock).
module four_leg_inverter_rl_model #(
  parameter real VDC   = 60.0,
  parameter real R     = 500.0,
  parameter real L     = 0.4,
  parameter real TSTEP = 10.0e-9
) (
  input  logic       clk,
  input  logic [3:0] gate_hi,   // legs a, b, c, n
  input  logic [3:0] gate_lo,
  output real        ia,
  output real        ib,
  output real        ic
);
  initial begin
    ia = 0.0; ib = 0.0; ic = 0.0;
  end

  function automatic real leg_voltage(input logic hi, input logic lo, input real i_out);
    if (hi)              return VDC;
    else if (lo)         return 0.0;
    else if (i_out < 0.0) return VDC;
    else                 return 0.0;
  endfunction

  always @(posedge clk) begin
    real va, vb, vc, vn;
    va = leg_voltage(gate_hi[0], gate_lo[0], ia);
    vb = leg_voltage(gate_hi[1], gate_lo[1], ib);
    vc = leg_voltage(gate_hi[2], gate_lo[2], ic);
    vn = leg_voltage(gate_hi[3], gate_lo[3], -(ia + ib + ic));
    ia = ia + TSTEP * ((va - vn) - R * ia) / L;
    ib = ib + TSTEP * ((vb - vn) - R * ib) / L;
    ic = ic + TSTEP * ((vc - vn) - R * ic) / L;
  end
endmodule
