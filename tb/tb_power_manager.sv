// tb_power_manager: random stimulus on every input of the power manager
// (activity strobes, DMA requests, register activity, four receive queues)
// with the thresholds rewritten over the register bus from time to time.
// A cycle model here predicts working_state, mac_grp_core_en, the mode and
// core_clk_en, and the outputs are compared every clock. The model
// accounts for the registers between the sub-blocks: queue condition and
// activity one clock, mode one clock, core_clk_en one more.
module tb_power_manager;
  import pm_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  logic udp_in_wr, vlan_remover_out_wr, lpl_in_fifo_empty, vlan_adder_out_wr, udp_out_wr;
  logic [3:0] wr_pkt_vld, dma_wr, pkt_avail, rd_rdy;
  logic dma_vld_c2n, work_reg_grp, pci_bus_dv;
  logic [NP-1:0][15:0] rx_data_count;
  logic [NP-1:0][7:0]  rx_packet_count;
  logic reg_req, reg_rd_wr_L, reg_ack;
  logic [ADDR_W-1:0] reg_addr;
  logic [REG_W-1:0] reg_wr_data, reg_rd_data;
  logic core_clk_en;
  pm_mode_e mode;
  int checks = 0, failures = 0;

  power_manager dut (
    .clk, .rst_n, .udp_in_wr, .vlan_remover_out_wr, .lpl_in_fifo_empty,
    .vlan_adder_out_wr, .udp_out_wr, .cpu_q_dma_wr_pkt_vld(wr_pkt_vld),
    .cpu_q_dma_wr(dma_wr), .cpu_q_dma_pkt_avail(pkt_avail), .cpu_q_dma_rd_rdy(rd_rdy),
    .dma_vld_c2n, .rx_data_count, .rx_packet_count, .work_reg_grp, .pci_bus_dv,
    .reg_req, .reg_rd_wr_L, .reg_addr, .reg_wr_data, .reg_ack, .reg_rd_data,
    .core_clk_en, .mode
  );

  always #4 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  logic [REG_W-1:0] t_idle, t_len, t_pkt, t_wait;
  int  wt [NP];
  bit  m_ws, m_mac, m_pkt_en, m_reg_en, m_en;
  pm_mode_e m_mode;
  int  m_idle;
  int  n_sleep = 0, n_wake = 0, n_reg_only = 0;

  function automatic bit r(input int n);
    return ($urandom_range(0, n - 1) == 0);
  endfunction

  initial begin
    {udp_in_wr, vlan_remover_out_wr, vlan_adder_out_wr, udp_out_wr} = '0;
    lpl_in_fifo_empty = 1;
    {wr_pkt_vld, dma_wr, pkt_avail, rd_rdy} = '0;
    {dma_vld_c2n, work_reg_grp, pci_bus_dv, reg_req, reg_rd_wr_L} = '0;
    reg_addr = '0; reg_wr_data = '0;
    rx_data_count = '0; rx_packet_count = '0;
    t_idle = 5; t_len = 2000; t_pkt = 1; t_wait = 12500;
    foreach (wt[p]) wt[p] = 0;
    m_ws = 0; m_mac = 0; m_mode = PM_WORKING; m_idle = 0; m_reg_en = 0; m_en = 1;
    repeat (2) @(posedge clk);
    checks++; if (core_clk_en !== 1 || mode !== PM_WORKING) failures++;
    rst_n = 1;
    for (int i = 0; i < 200000; i++) begin
      bit ws_in, mac_in, reg_in, wake, busy;
      pm_mode_e nm;
      @(negedge clk);
      // stimulus: quiet stretches with occasional activity
      udp_in_wr = r(60); vlan_remover_out_wr = r(200); lpl_in_fifo_empty = !r(200);
      vlan_adder_out_wr = r(200); udp_out_wr = r(200);
      wr_pkt_vld = {3'b0, r(400)}; dma_wr = {r(400), 3'b0};
      pkt_avail = {1'b0, r(400), 2'b0}; rd_rdy = {2'b0, r(400), 1'b0};
      dma_vld_c2n = r(500); work_reg_grp = r(700); pci_bus_dv = r(700);
      for (int p = 0; p < NP; p++) begin
        if (r(150)) begin
          rx_packet_count[p] += 1;
          rx_data_count[p] += 16'($urandom_range(64, 1518));
        end else if (r(300)) begin
          rx_packet_count[p] = 0; rx_data_count[p] = 0;
        end
      end
      reg_req = 0;
      if (i % 20000 == 19999) begin
        int a = $urandom_range(0, 3);
        logic [REG_W-1:0] d;
        case (a)
          0: d = $urandom_range(0, 20);
          1: d = $urandom_range(1000, 8000);
          2: d = $urandom_range(1, 6);
          default: d = $urandom_range(50, 3000);
        endcase
        reg_req = 1; reg_rd_wr_L = 0; reg_addr = ADDR_W'(a); reg_wr_data = d;
      end
      // model inputs as seen at the coming edge
      ws_in = udp_in_wr | vlan_remover_out_wr | !lpl_in_fifo_empty | vlan_adder_out_wr |
              udp_out_wr | (|wr_pkt_vld) | (|dma_wr) | (|pkt_avail) | (|rd_rdy);
      mac_in = 0;
      for (int p = 0; p < NP; p++)
        if (rx_data_count[p] >= t_len || rx_packet_count[p] >= t_pkt || wt[p] >= t_wait)
          mac_in = 1;
      reg_in = work_reg_grp | pci_bus_dv;
      // FSM on the registered ws/mac of the previous edge
      wake = m_mac | dma_vld_c2n;
      busy = wake | m_ws;
      nm = m_mode;
      case (m_mode)
        PM_WORKING: if (!busy) begin nm = PM_IDLE; m_idle = 0; end
        PM_IDLE: begin
          m_idle++;
          if (busy) nm = PM_WORKING;
          else if (m_idle >= ((t_idle == 0) ? 1 : t_idle)) nm = PM_SLEEP;
        end
        default: if (wake) nm = PM_WORKING;
      endcase
      @(posedge clk);
      m_en = (m_mode != PM_SLEEP) | m_reg_en;
      m_mode = nm;
      m_ws = ws_in; m_mac = mac_in; m_reg_en = reg_in;
      for (int p = 0; p < NP; p++) wt[p] = (rx_packet_count[p] == 0) ? 0 : wt[p] + 1;
      if (reg_req) case (reg_addr)
        0: t_idle = reg_wr_data;
        1: t_len = reg_wr_data;
        2: t_pkt = reg_wr_data;
        default: t_wait = reg_wr_data;
      endcase
      #1;
      checks++;
      if (mode !== m_mode || core_clk_en !== m_en) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: mode %s/%s en %b/%b", i, mode.name(), m_mode.name(), core_clk_en, m_en);
      end
      if (m_mode == PM_SLEEP) n_sleep++;
      if (m_mode == PM_SLEEP && m_en) n_reg_only++;
    end
    $display("sleep cycles %0d, clock kept for registers during sleep %0d", n_sleep, n_reg_only);
    checks += 2;
    if (n_sleep == 0) failures++;
    if (n_reg_only == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
