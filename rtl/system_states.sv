// system_states: reports whether the packet-processing core is still busy.
//
// Four groups of activity strobes are formed from the User Data Path and the
// CPU DMA queues, and working_state is high when any group is active:
//   work_udp_grp0  = udp_in_wr | vlan_remover_out_wr | !lpl_in_fifo_empty
//   work_udp_grp1  = vlan_adder_out_wr | udp_out_wr
//   work_cputx_grp = |cpu_q_dma_wr_pkt_vld | |cpu_q_dma_wr
//   work_cpurx_grp = |cpu_q_dma_pkt_avail | |cpu_q_dma_rd_rdy
// The signal names and the grouping follow the design; the OR between the
// members, the inversion of the lookup FIFO "empty" flag and the one register
// stage on the output are this design's choices. The CPU queue signals are
// one bit per CPU queue (NUM_CPU_Q, four on NetFPGA).
//
// Timing: all inputs are taken as synchronous to clk; working_state is
// registered, so it follows the inputs one clock later.
module system_states #(
  parameter int unsigned NUM_CPU_Q = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // User Data Path activity
  input  logic                 udp_in_wr,
  input  logic                 vlan_remover_out_wr,
  input  logic                 lpl_in_fifo_empty,
  input  logic                 vlan_adder_out_wr,
  input  logic                 udp_out_wr,
  // CPU DMA queue activity
  input  logic [NUM_CPU_Q-1:0] cpu_q_dma_wr_pkt_vld,
  input  logic [NUM_CPU_Q-1:0] cpu_q_dma_wr,
  input  logic [NUM_CPU_Q-1:0] cpu_q_dma_pkt_avail,
  input  logic [NUM_CPU_Q-1:0] cpu_q_dma_rd_rdy,
  output logic                 working_state
);

  logic work_udp_grp0, work_udp_grp1, work_cputx_grp, work_cpurx_grp;

  always_comb begin
    work_udp_grp0  = udp_in_wr | vlan_remover_out_wr | ~lpl_in_fifo_empty;
    work_udp_grp1  = vlan_adder_out_wr | udp_out_wr;
    work_cputx_grp = (|cpu_q_dma_wr_pkt_vld) | (|cpu_q_dma_wr);
    work_cpurx_grp = (|cpu_q_dma_pkt_avail) | (|cpu_q_dma_rd_rdy);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) working_state <= 1'b0;
    else        working_state <= work_udp_grp0 | work_udp_grp1
                               | work_cputx_grp | work_cpurx_grp;
  end

endmodule
