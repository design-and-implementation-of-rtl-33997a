// switching_frequency_select: switching period chosen from two switches.
//
// choice = 00 selects 1 kHz, 01 selects 2 kHz, and any other value 5 kHz,
// as on the board's slide switches. The block outputs the period in clock
// cycles, T_s = CLK_HZ / f_sw: 100000, 50000 or 20000 at 100 MHz.
//
// The mapping of choice to frequency is the document's; expressing the
// result as a cycle count (instead of a divided clock) is this design's.
// The choice input comes from a mechanical switch, so it is passed through
// two flip-flops before use.
//
// Timing: ts follows choice three cycles later (two synchroniser stages and
// the output register).
module switching_frequency_select
  import svm_pkg::*;
#(
  parameter int unsigned CLK_HZ = 100_000_000
) (
  input  logic       clk,
  input  logic [1:0] choice,
  output cyc_t       ts
);
  localparam int unsigned TS_1K = CLK_HZ / 1000;
  localparam int unsigned TS_2K = CLK_HZ / 2000;
  localparam int unsigned TS_5K = CLK_HZ / 5000;

  logic [1:0] sync1, sync2;

  always_ff @(posedge clk) begin
    sync1 <= choice;
    sync2 <= sync1;
    unique case (sync2)
      2'b00:   ts <= cyc_t'(TS_1K);
      2'b01:   ts <= cyc_t'(TS_2K);
      default: ts <= cyc_t'(TS_5K);
    endcase
  end

  initial assert (TS_1K < 2**TIME_W) else $error("switching_frequency_select: period does not fit TIME_W");
endmodule
