// reference_generation: three-phase sine references from a sample table.
//
// One period of the reference is held as N_SAMPLES samples; an index i runs
// 0..N_SAMPLES-1 and advances on every `tick` from the clock divider, so the
// reference frequency is f_tick / N_SAMPLES (30 kHz / 600 = 50 Hz). Phase a
// reads sample i, phases b and c read the samples a third and two thirds of
// a period later in the delay sense, i.e. v_b = sin(wt - 2pi/3) and
// v_c = sin(wt - 4pi/3).
//
// Amplitude AMP is a Q2.14 fraction of v_dc; the default 8192 is 0.5 v_dc
// (30 V references on a 60 V link). With mode = 1 (unbalanced) phase a is
// scaled to half of that, phases b and c keep AMP.
//
// The 600-sample table and the balanced/unbalanced switch follow the
// document. The table holds one full sine period and is filled at
// elaboration from sin(2*pi*k/N_SAMPLES) * AMP, rounded; as an array of
// constants it becomes a ROM. The mode encoding (1 = unbalanced) and the
// phase offset by index arithmetic are this design's choices.
//
// Timing: outputs are registered and change one cycle after a tick (or
// after a change of mode). Reset sets i = 0.
module reference_generation
  import svm_pkg::*;
#(
  parameter int unsigned N_SAMPLES = 600,
  parameter int unsigned AMP       = 8192
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic        mode,
  output logic [$clog2(N_SAMPLES)-1:0] idx,
  output abc_t        vabc
);
  localparam int IW = $clog2(N_SAMPLES);
  localparam real PI = 3.14159265358979323846;

  typedef volt_t table_t [N_SAMPLES];

  function automatic table_t make_table();
    table_t t;
    for (int k = 0; k < N_SAMPLES; k++)
      t[k] = volt_t'($rtoi($floor($sin(2.0 * PI * real'(k) / real'(N_SAMPLES)) * real'(AMP) + 0.5)));
    return t;
  endfunction

  localparam table_t SINE = make_table();

  localparam int unsigned THIRD  = N_SAMPLES / 3;
  localparam int unsigned THIRD2 = (2 * N_SAMPLES) / 3;

  logic [IW-1:0] ib, ic;

  // Index of a sample delayed by a third / two thirds of a period.
  always_comb begin
    ib = (idx >= IW'(THIRD))  ? IW'(idx - IW'(THIRD))  : IW'(idx + IW'(N_SAMPLES - THIRD));
    ic = (idx >= IW'(THIRD2)) ? IW'(idx - IW'(THIRD2)) : IW'(idx + IW'(N_SAMPLES - THIRD2));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx  <= '0;
      vabc <= '0;
    end else begin
      if (tick) idx <= (idx == IW'(N_SAMPLES - 1)) ? '0 : idx + 1'b1;
      vabc.va <= mode ? (SINE[idx] >>> 1) : SINE[idx];
      vabc.vb <= SINE[ib];
      vabc.vc <= SINE[ic];
    end
  end

  initial assert (N_SAMPLES % 3 == 0) else $error("reference_generation: N_SAMPLES must be a multiple of 3");
endmodule
