// svm_top_level: 3-D space vector modulator for a three-phase four-leg
// inverter.
//
// From the 100 MHz board clock the controller generates its own 50 Hz
// three-phase reference (balanced, or with phase a at half amplitude) and
// turns it into the eight gate signals of a two-level four-leg inverter by
// three-dimensional space vector modulation:
//
//   clock_divider -> reference_generation -> coordinate_transformation
//     -> prism_determination -> tetrahedron_identification
//     -> switching_time_calculation -> on_off_times -> pulses_generation
//   switching_frequency_select supplies the switching period T_s.
//
// The datapath from the reference to the switching instants is a free-
// running pipeline, one register per block (five cycles from a new sample to
// new instants). pulses_generation takes the newest instants at the start
// of each switching period. Ports follow the document's top-level
// schematic: clk_p, reset (active high, all gates off), Choice (00 1 kHz,
// 01 2 kHz, else 5 kHz), Mode (this design: 0 balanced, 1 unbalanced) and,
// per leg x in {a, b, c, n}, the upper gate sx and lower gate sx_bar.
//
// The chain of blocks, the 600-sample table, the frequencies and the 4 us
// dead time are the document's; fixed-point formats, the pipeline
// registers and the period-boundary update are this design's.
module svm_top_level
  import svm_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 100_000_000,
  parameter int unsigned CLK_DIV   = 3333,
  parameter int unsigned N_SAMPLES = 600,
  parameter int unsigned AMP       = 8192,
  parameter int unsigned DEAD_TIME = 400
) (
  input  logic       clk_p,
  input  logic       reset,
  input  logic [1:0] Choice,
  input  logic       Mode,
  output logic       sa,
  output logic       sa_bar,
  output logic       sb,
  output logic       sb_bar,
  output logic       sc,
  output logic       sc_bar,
  output logic       sn,
  output logic       sn_bar
);
  logic   tick;
  logic   [$clog2(N_SAMPLES)-1:0] idx;
  abc_t   vabc;
  abg_t   vabg, vabg_p, vabg_t;
  prism_t prism_p, prism_t2, prism_s;
  tet_t   tet_t2, tet_s;
  cyc_t   ts, ts_s, ts_o;
  cyc_t   t1, t2, t3, t4;
  cyc_t   t_on [4];
  cyc_t   t_off [4];
  logic [3:0] gate_hi, gate_lo;
  logic   period_start;

  clock_divider #(.DIV(CLK_DIV)) u_div (
    .clk(clk_p), .rst(reset), .tick(tick));

  reference_generation #(.N_SAMPLES(N_SAMPLES), .AMP(AMP)) u_ref (
    .clk(clk_p), .rst(reset), .tick(tick), .mode(Mode), .idx(idx), .vabc(vabc));

  coordinate_transformation u_abg (
    .clk(clk_p), .vabc(vabc), .vabg(vabg));

  prism_determination u_prism (
    .clk(clk_p), .vabg(vabg), .prism(prism_p), .vabg_o(vabg_p));

  tetrahedron_identification u_tet (
    .clk(clk_p), .prism(prism_p), .vabg(vabg_p),
    .tet(tet_t2), .prism_o(prism_t2), .vabg_o(vabg_t));

  switching_frequency_select #(.CLK_HZ(CLK_HZ)) u_fsel (
    .clk(clk_p), .choice(Choice), .ts(ts));

  switching_time_calculation u_time (
    .clk(clk_p), .prism(prism_t2), .tet(tet_t2), .vabg(vabg_t), .ts(ts),
    .t1(t1), .t2(t2), .t3(t3), .t4(t4),
    .prism_o(prism_s), .tet_o(tet_s), .ts_o(ts_s));

  on_off_times u_onoff (
    .clk(clk_p), .prism(prism_s), .tet(tet_s),
    .t1(t1), .t2(t2), .t3(t3), .t4(t4), .ts(ts_s),
    .t_on(t_on), .t_off(t_off), .ts_o(ts_o));

  pulses_generation #(.DEAD_TIME(DEAD_TIME)) u_pulse (
    .clk(clk_p), .rst(reset), .ts(ts_o), .t_on(t_on), .t_off(t_off),
    .gate_hi(gate_hi), .gate_lo(gate_lo), .period_start(period_start));

  assign sa     = gate_hi[0];
  assign sa_bar = gate_lo[0];
  assign sb     = gate_hi[1];
  assign sb_bar = gate_lo[1];
  assign sc     = gate_hi[2];
  assign sc_bar = gate_lo[2];
  assign sn     = gate_hi[3];
  assign sn_bar = gate_lo[3];
endmodule
