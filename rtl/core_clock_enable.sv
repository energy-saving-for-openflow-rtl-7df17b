// core_clock_enable: the single clock-enable request sent to the clock
// controller.
//
// core_clk_en is 1 when the packets manager wants the clock
// (core_clk_packet_en, WORKING or IDLE mode) or the registers manager does
// (core_clk_reg_en), and 0 only when both release it. The decision follows
// the design; the output register is this design's choice, so that the
// clock multiplexer select never sees a combinational glitch.
//
// Timing: core_clk_en follows the inputs one clock later.
module core_clock_enable (
  input  logic clk,
  input  logic rst_n,
  input  logic core_clk_packet_en,
  input  logic core_clk_reg_en,
  output logic core_clk_en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) core_clk_en <= 1'b1;
    else        core_clk_en <= core_clk_packet_en | core_clk_reg_en;
  end

endmodule
