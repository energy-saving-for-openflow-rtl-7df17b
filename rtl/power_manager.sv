// power_manager: decides when the switch core may lose its clock.
//
// The block joins six sub-blocks, as the design partitions it:
//   system_states      - UDP / CPU queue activity  -> working_state
//   pm_registers       - software thresholds
//   queue_condition    - MAC RX queue thresholds   -> mac_grp_core_en
//   packets_manager    - WORKING/IDLE/SLEEP mode   -> core_clk_packet_en
//   registers_manager  - register / PCI activity   -> core_clk_reg_en
//   core_clock_enable  - OR of both requests       -> core_clk_en
// Everything runs on clk, the ungated 125 MHz transmit clock, so that the
// manager keeps watching the receive queues while the core sleeps. All
// status inputs are taken as synchronous to clk.
//
// Timing: from a receive queue reaching a threshold (rx_* inputs sampled at
// clock edge 1) core_clk_en rises after edge 3: queue_condition,
// packets_manager and core_clock_enable each add one register. The clock
// controller then restarts the core clock at edge 4.
module power_manager
  import pm_pkg::*;
#(
  parameter int unsigned NUM_PORTS  = 4,
  parameter int unsigned NUM_CPU_Q  = 4,
  parameter int unsigned DATA_CNT_W = 16,
  parameter int unsigned PKT_CNT_W  = 8,
  parameter int unsigned TIMER_W    = 24
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // User Data Path
  input  logic                                 udp_in_wr,
  input  logic                                 vlan_remover_out_wr,
  input  logic                                 lpl_in_fifo_empty,
  input  logic                                 vlan_adder_out_wr,
  input  logic                                 udp_out_wr,
  // CPU DMA queues
  input  logic [NUM_CPU_Q-1:0]                 cpu_q_dma_wr_pkt_vld,
  input  logic [NUM_CPU_Q-1:0]                 cpu_q_dma_wr,
  input  logic [NUM_CPU_Q-1:0]                 cpu_q_dma_pkt_avail,
  input  logic [NUM_CPU_Q-1:0]                 cpu_q_dma_rd_rdy,
  // NF2 DMA
  input  logic                                 dma_vld_c2n,
  // NF2 MAC receive queues
  input  logic [NUM_PORTS-1:0][DATA_CNT_W-1:0] rx_data_count,
  input  logic [NUM_PORTS-1:0][PKT_CNT_W-1:0]  rx_packet_count,
  // Register group and PCI bus activity
  input  logic                                 work_reg_grp,
  input  logic                                 pci_bus_dv,
  // Software register bus
  input  logic                                 reg_req,
  input  logic                                 reg_rd_wr_L,
  input  logic [ADDR_W-1:0]                    reg_addr,
  input  logic [REG_W-1:0]                     reg_wr_data,
  output logic                                 reg_ack,
  output logic [REG_W-1:0]                     reg_rd_data,
  // To the clock controller and for observation
  output logic                                 core_clk_en,
  output pm_mode_e                             mode
);

  pm_thresholds_t thresholds;
  logic working_state, mac_grp_core_en, core_clk_packet_en, core_clk_reg_en;

  system_states #(.NUM_CPU_Q(NUM_CPU_Q)) u_system_states (
    .clk, .rst_n,
    .udp_in_wr, .vlan_remover_out_wr, .lpl_in_fifo_empty,
    .vlan_adder_out_wr, .udp_out_wr,
    .cpu_q_dma_wr_pkt_vld, .cpu_q_dma_wr, .cpu_q_dma_pkt_avail, .cpu_q_dma_rd_rdy,
    .working_state
  );

  pm_registers u_registers (
    .clk, .rst_n,
    .reg_req, .reg_rd_wr_L, .reg_addr, .reg_wr_data, .reg_ack, .reg_rd_data,
    .thresholds
  );

  queue_condition #(
    .NUM_PORTS(NUM_PORTS), .DATA_CNT_W(DATA_CNT_W),
    .PKT_CNT_W(PKT_CNT_W), .TIMER_W(TIMER_W)
  ) u_queue_condition (
    .clk, .rst_n, .rx_data_count, .rx_packet_count, .thresholds, .mac_grp_core_en
  );

  packets_manager u_packets_manager (
    .clk, .rst_n, .mac_grp_core_en, .dma_vld_c2n, .working_state,
    .idle_timeout(thresholds.idle_timeout), .mode, .core_clk_packet_en
  );

  registers_manager u_registers_manager (
    .clk, .rst_n, .work_reg_grp, .pci_bus_dv, .core_clk_reg_en
  );

  core_clock_enable u_core_clock_enable (
    .clk, .rst_n, .core_clk_packet_en, .core_clk_reg_en, .core_clk_en
  );

endmodule
