// registers_manager: keeps the core clock running for register traffic.
//
// core_clk_reg_en is 1 while the NetFPGA register group reports that its
// queues are busy (work_reg_grp) or the PCI bus announces an access
// (pci_bus_dv), so that software register reads and writes are served even
// when no packets flow. The OR of the two follows the design; the output
// register is this design's choice, to give the clock-enable path a clean,
// glitch-free signal.
//
// Timing: core_clk_reg_en follows (work_reg_grp | pci_bus_dv) one clock
// later.
module registers_manager (
  input  logic clk,
  input  logic rst_n,
  input  logic work_reg_grp,
  input  logic pci_bus_dv,
  output logic core_clk_reg_en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) core_clk_reg_en <= 1'b0;
    else        core_clk_reg_en <= work_reg_grp | pci_bus_dv;
  end

endmodule
