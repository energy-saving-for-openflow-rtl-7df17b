// balance_switch_top: the power-saving additions of the Balance Switch.
//
// An OpenFlow switch on NetFPGA is left clocked at 125 MHz even when no
// traffic flows. This top adds the two blocks that stop its core clock:
// the power manager, which runs on the always-on transmit clock (gtx_clk),
// watches the receive queues, the packet pipeline, the CPU DMA queues and
// the register bus, and the clock controller, which passes core_clk to the
// switch core as core_clk_int only while the manager's core_clk_en is 1.
// Packets that arrive while the core sleeps wait in the MAC receive queues
// (which run on their own receive clock) until a queue threshold wakes it.
//
// The switch core itself (MACs, User Data Path, CPU queues, DMA, PCI and
// register blocks) is not part of this RTL; its status signals are ports.
// gtx_clk and core_clk are both 125 MHz; the clock controller expects them
// to be of one source and in phase.
//
// Timing: a receive queue reaching a threshold while the core sleeps
// restarts core_clk_int at the fourth rising clock edge after the counts
// change (three registers in the manager, one falling-edge register in the
// clock controller).
module balance_switch_top
  import pm_pkg::*;
#(
  parameter int unsigned NUM_PORTS  = 4,
  parameter int unsigned NUM_CPU_Q  = 4,
  parameter int unsigned DATA_CNT_W = 16,
  parameter int unsigned PKT_CNT_W  = 8,
  parameter int unsigned TIMER_W    = 24
) (
  input  logic                                 gtx_clk,
  input  logic                                 core_clk,
  input  logic                                 rst_n,
  input  logic                                 udp_in_wr,
  input  logic                                 vlan_remover_out_wr,
  input  logic                                 lpl_in_fifo_empty,
  input  logic                                 vlan_adder_out_wr,
  input  logic                                 udp_out_wr,
  input  logic [NUM_CPU_Q-1:0]                 cpu_q_dma_wr_pkt_vld,
  input  logic [NUM_CPU_Q-1:0]                 cpu_q_dma_wr,
  input  logic [NUM_CPU_Q-1:0]                 cpu_q_dma_pkt_avail,
  input  logic [NUM_CPU_Q-1:0]                 cpu_q_dma_rd_rdy,
  input  logic                                 dma_vld_c2n,
  input  logic [NUM_PORTS-1:0][DATA_CNT_W-1:0] rx_data_count,
  input  logic [NUM_PORTS-1:0][PKT_CNT_W-1:0]  rx_packet_count,
  input  logic                                 work_reg_grp,
  input  logic                                 pci_bus_dv,
  input  logic                                 reg_req,
  input  logic                                 reg_rd_wr_L,
  input  logic [ADDR_W-1:0]                    reg_addr,
  input  logic [REG_W-1:0]                     reg_wr_data,
  output logic                                 reg_ack,
  output logic [REG_W-1:0]                     reg_rd_data,
  output logic                                 core_clk_en,
  output logic [1:0]                           pm_mode,
  output logic                                 core_clk_int
);

  pm_mode_e mode;

  power_manager #(
    .NUM_PORTS(NUM_PORTS), .NUM_CPU_Q(NUM_CPU_Q), .DATA_CNT_W(DATA_CNT_W),
    .PKT_CNT_W(PKT_CNT_W), .TIMER_W(TIMER_W)
  ) u_power_manager (
    .clk(gtx_clk), .rst_n,
    .udp_in_wr, .vlan_remover_out_wr, .lpl_in_fifo_empty,
    .vlan_adder_out_wr, .udp_out_wr,
    .cpu_q_dma_wr_pkt_vld, .cpu_q_dma_wr, .cpu_q_dma_pkt_avail, .cpu_q_dma_rd_rdy,
    .dma_vld_c2n, .rx_data_count, .rx_packet_count, .work_reg_grp, .pci_bus_dv,
    .reg_req, .reg_rd_wr_L, .reg_addr, .reg_wr_data, .reg_ack, .reg_rd_data,
    .core_clk_en, .mode
  );

  assign pm_mode = mode;

  clock_controller u_clock_controller (
    .core_clk_in(core_clk), .rst_n, .core_clk_en, .core_clk_int
  );

endmodule
