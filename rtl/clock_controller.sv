// clock_controller: gates the 125 MHz core clock on and off.
//
// This is the clock multiplexer of the clock controller: a high core_clk_en
// passes the core clock (125 MHz) to core_clk_int, a low one selects a
// constant 0 (0 MHz), which stops every block on core_clk_int. Only the
// power manager, on the ungated clock, keeps running.
//
// How it works: the select is captured on the falling edge of the core
// clock and ANDed with it. Because the captured enable can only change
// while the clock is low, core_clk_int never produces a shortened pulse,
// which is what the vendor clock multiplexer guarantees. The design builds
// this from a DCM (de-skew DLL), a global buffer and a BUFGMUX vendor
// primitive; here the DCM output is taken to be the input clock itself and
// the multiplexer is written as logic, which is this design's choice.
// core_clk_en must be synchronous to a clock of the same frequency and
// phase as core_clk_in (true when the power manager's clock and the core
// clock come from one 125 MHz source); for unrelated clocks a synchronizer
// would have to be added in front. The clock runs during reset.
//
// Timing: a change of core_clk_en before a falling edge of core_clk_in takes
// effect from the next rising edge.
module clock_controller (
  input  logic core_clk_in,   // 125 MHz core clock (DCM CLK0)
  input  logic rst_n,
  input  logic core_clk_en,   // 1: pass the clock, 0: hold it low
  output logic core_clk_int   // gated core clock for the switch core
);

  logic en_q;

  always_ff @(negedge core_clk_in or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b1;
    else        en_q <= core_clk_en;
  end

  assign core_clk_int = core_clk_in & en_q;

endmodule
