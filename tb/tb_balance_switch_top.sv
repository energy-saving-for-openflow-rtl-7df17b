// tb_balance_switch_top: end-to-end test of the power manager and clock
// controller, with every parameter at its default.
//
// Around the design sits a small model of the switch:
//  - four receive queues fed at 1 byte per clock per port (1 Gbit/s at
//    125 MHz). A packet counts in rx_packet_count once its last byte is in;
//    its bytes count in rx_data_count as they arrive. The queues run on the
//    ungated clock, like the MAC receive side.
//  - a switch core on the gated clock core_clk_int that reads one complete
//    packet at a time, 8 bytes per clock, raising udp_in_wr while reading
//    and udp_out_wr four clocks later, and that raises cpu_q_dma_wr for ten
//    clocks after a DMA request (dma_vld_c2n).
// The test runs these phases:
//  A  Low Power thresholds (reset values): sparse single packets, each must
//     wake the sleeping core through Max Packet Number.
//  B  a DMA request wakes the sleeping core.
//  C  a CPU queue event (working_state alone) returns IDLE to WORKING.
//  D  register writes with pci_bus_dv while asleep: the clock runs with the
//     mode still SLEEP; they load the Save Power thresholds.
//  E  Save Power: bursts on all ports wake the core through Max Queue
//     Length; then, with Wait Timeout shortened to 3000 clocks, one packet
//     alone must wait that long before it is forwarded. (Wait Timeout is
//     also cut to 20000 clocks for the bursts, whose tails would otherwise
//     wait the full 100 ms of the Save Power setting.)
// Checked throughout: the gated clock only runs while core_clk_en allowed
// it; each wake-up from SLEEP restarts the clock 3 or 4 clocks after the
// triggering queue condition (3 by construction; 2 for a DMA request, which
// skips the queue-condition register); the wait-timeout wake-up comes
// Wait Timeout clocks after the first packet; no receive queue grows past
// its 8096 bytes; every packet sent is forwarded. Each mechanism (the
// three queue wake-ups, DMA wake-up, IDLE->WORKING, IDLE->SLEEP, register
// access in SLEEP) must occur at least once.
module tb_balance_switch_top;
  import pm_pkg::*;
  localparam int NP = 4;
  localparam int RXQ_BYTES = 8096;

  logic clk = 0, rst_n = 0;
  logic udp_in_wr, vlan_remover_out_wr, lpl_in_fifo_empty, vlan_adder_out_wr, udp_out_wr;
  logic [3:0] cpu_q_dma_wr_pkt_vld, cpu_q_dma_wr, cpu_q_dma_pkt_avail, cpu_q_dma_rd_rdy;
  logic dma_vld_c2n = 0, work_reg_grp = 0, pci_bus_dv = 0;
  logic [NP-1:0][15:0] rx_data_count;
  logic [NP-1:0][7:0]  rx_packet_count;
  logic reg_req = 0, reg_rd_wr_L = 0, reg_ack;
  logic [ADDR_W-1:0] reg_addr = '0;
  logic [REG_W-1:0] reg_wr_data = '0, reg_rd_data;
  logic core_clk_en, core_clk_int;
  logic [1:0] pm_mode;

  balance_switch_top dut (
    .gtx_clk(clk), .core_clk(clk), .rst_n,
    .udp_in_wr, .vlan_remover_out_wr, .lpl_in_fifo_empty, .vlan_adder_out_wr, .udp_out_wr,
    .cpu_q_dma_wr_pkt_vld, .cpu_q_dma_wr, .cpu_q_dma_pkt_avail, .cpu_q_dma_rd_rdy,
    .dma_vld_c2n, .rx_data_count, .rx_packet_count, .work_reg_grp, .pci_bus_dv,
    .reg_req, .reg_rd_wr_L, .reg_addr, .reg_wr_data, .reg_ack, .reg_rd_data,
    .core_clk_en, .pm_mode, .core_clk_int
  );

  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $realtime, msg);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // Receive side (ungated clock)
  int arr_bytes [NP], arr_pkts [NP];      // written on clk
  int con_bytes [NP], con_pkts [NP];      // written on core_clk_int
  int pkt_len [NP][$];                     // lengths of packets in flight
  int rx_left [NP];                        // bytes still to receive
  int tx_queue [NP][$];                    // packets waiting to be sent in
  int sent = 0, forwarded = 0;

  always_comb
    for (int p = 0; p < NP; p++) begin
      rx_data_count[p]   = 16'(arr_bytes[p] - con_bytes[p]);
      rx_packet_count[p] = 8'(arr_pkts[p] - con_pkts[p]);
    end

  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (rx_left[p] == 0 && tx_queue[p].size() != 0) begin
        rx_left[p] = tx_queue[p].pop_front();
        pkt_len[p].push_back(rx_left[p]);
      end
      if (rx_left[p] != 0) begin
        arr_bytes[p] <= arr_bytes[p] + 1;
        rx_left[p]--;
        if (rx_left[p] == 0) arr_pkts[p] <= arr_pkts[p] + 1;
      end
    end
  end

  task automatic send(input int p, input int len);
    tx_queue[p].push_back(len);
    sent++;
  endtask

  // ------------------------------------------------------------------
  // Switch core model (gated clock)
  int cur_port = -1, cur_left = 0, rr = 0, dma_busy = 0;
  logic [3:0] out_pipe = '0;
  logic dma_seen = 0;

  always @(posedge clk) if (dma_vld_c2n) dma_seen <= 1;

  always @(posedge core_clk_int) begin
    if (cur_port < 0) begin
      for (int k = 0; k < NP; k++) begin
        automatic int p = (rr + k) % NP;
        if (cur_port < 0 && arr_pkts[p] - con_pkts[p] > 0) begin
          cur_port = p;
          cur_left = pkt_len[p].pop_front();
          rr = (p + 1) % NP;
        end
      end
    end
    udp_in_wr <= (cur_port >= 0);
    out_pipe  <= {out_pipe[2:0], 1'b0};
    if (cur_port >= 0) begin
      automatic int n = (cur_left < 8) ? cur_left : 8;
      con_bytes[cur_port] <= con_bytes[cur_port] + n;
      cur_left -= n;
      if (cur_left == 0) begin
        con_pkts[cur_port] <= con_pkts[cur_port] + 1;
        forwarded++;
        out_pipe[0] <= 1'b1;
        cur_port = -1;
      end
    end
    if (dma_seen) begin
      dma_busy = 10;
      dma_seen <= 0;
    end
    cpu_q_dma_wr <= (dma_busy > 0) ? 4'b0001 : 4'b0000;
    if (dma_busy > 0) dma_busy--;
  end

  assign udp_out_wr          = out_pipe[3];
  assign vlan_remover_out_wr = out_pipe[0];
  assign vlan_adder_out_wr   = out_pipe[2];
  assign lpl_in_fifo_empty   = ~out_pipe[1];

  // ------------------------------------------------------------------
  // Observation and checks on the ungated clock
  pm_thresholds_t thr;        // the test's copy of the thresholds
  int since_first [NP];
  int n_wake_len = 0, n_wake_pkt = 0, n_wake_wait = 0, n_wake_dma = 0;
  int n_idle_to_work_ws = 0, n_idle_to_sleep = 0, n_reg_clock_in_sleep = 0;
  int n_sleep_cycles = 0, n_cycles = 0;
  int wake_timer = -1;          // 0 while a wake-up is pending
  realtime t_trigger;
  string wake_cause;
  logic en_prev_fall = 1;
  logic [1:0] mode_q = 2'(PM_WORKING);
  logic ws_only = 0;

  always @(negedge clk) en_prev_fall <= core_clk_en;

  always @(posedge core_clk_int) begin
    checks++;
    if (!en_prev_fall) fail("gated clock ran while core_clk_en was 0");
    if (pm_mode == 2'(PM_SLEEP)) n_reg_clock_in_sleep++;
    if (wake_timer >= 0) begin
      int lat;
      lat = int'(($realtime - t_trigger) / 8.0);
      checks++;
      // a queue condition passes one more register than a DMA request
      if (lat < ((wake_cause == "dma") ? 2 : 3) || lat > 4)
        fail($sformatf("wake-up by %s took %0d clocks", wake_cause, lat));
      wake_timer = -1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    bit by_len, by_pkt, by_wait;
    n_cycles++;
    if (pm_mode == 2'(PM_SLEEP)) n_sleep_cycles++;
    // wake condition as sampled at this edge
    by_len = 0; by_pkt = 0; by_wait = 0;
    for (int p = 0; p < NP; p++) begin
      if (rx_data_count[p] >= thr.max_queue_len) by_len = 1;
      if (rx_packet_count[p] >= thr.max_pkt_num) by_pkt = 1;
      if (since_first[p] >= thr.wait_timeout) by_wait = 1;
    end
    if (pm_mode == 2'(PM_SLEEP) && !core_clk_en && wake_timer < 0) begin
      if (by_len || by_pkt || by_wait || dma_vld_c2n) begin
        wake_timer = 0;
        t_trigger = $realtime;
        if (dma_vld_c2n)  begin wake_cause = "dma";    n_wake_dma++;  end
        else if (by_len)  begin wake_cause = "length"; n_wake_len++;  end
        else if (by_pkt)  begin wake_cause = "packets"; n_wake_pkt++; end
        else              begin wake_cause = "wait";   n_wake_wait++; end
      end
    end
    for (int p = 0; p < NP; p++) begin
      since_first[p] = (rx_packet_count[p] == 0) ? 0 : since_first[p] + 1;
      checks++;
      if (int'(rx_data_count[p]) > RXQ_BYTES) fail("receive queue overflow");
    end
    // mode transitions
    if (mode_q == 2'(PM_IDLE) && pm_mode == 2'(PM_SLEEP)) n_idle_to_sleep++;
    if (mode_q == 2'(PM_IDLE) && pm_mode == 2'(PM_WORKING) && ws_only) n_idle_to_work_ws++;
    mode_q <= pm_mode;
  end

  // working_state alone is active when no queue or DMA condition is
  always @(posedge clk) ws_only <= (dut.u_power_manager.working_state &&
                                    !dut.u_power_manager.mac_grp_core_en && !dma_vld_c2n);

  // ------------------------------------------------------------------
  task automatic wait_mode(input pm_mode_e m, input int limit);
    int n = 0;
    while (pm_mode != 2'(m) && n < limit) begin @(posedge clk); n++; end
    checks++;
    if (pm_mode != 2'(m)) fail($sformatf("mode %s not reached", m.name()));
  endtask

  task automatic reg_write(input int a, input logic [REG_W-1:0] d);
    @(negedge clk);
    pci_bus_dv = 1; reg_req = 1; reg_rd_wr_L = 0; reg_addr = ADDR_W'(a); reg_wr_data = d;
    @(negedge clk);
    reg_req = 0; pci_bus_dv = 0;
    checks++;
    if (!reg_ack) fail("no register ack");
  endtask

  task automatic reg_read(input int a, input logic [REG_W-1:0] exp);
    @(negedge clk);
    pci_bus_dv = 1; reg_req = 1; reg_rd_wr_L = 1; reg_addr = ADDR_W'(a);
    @(negedge clk);
    reg_req = 0; pci_bus_dv = 0;
    checks++;
    if (!reg_ack || reg_rd_data != exp) fail("register read-back");
  endtask

  task automatic drain(input int limit);
    int n = 0;
    while ((forwarded != sent) && n < limit) begin @(posedge clk); n++; end
  endtask

  initial begin
    foreach (arr_bytes[p]) begin
      arr_bytes[p] = 0; arr_pkts[p] = 0; con_bytes[p] = 0; con_pkts[p] = 0;
      rx_left[p] = 0; since_first[p] = 0;
    end
    udp_in_wr = 0; cpu_q_dma_wr = '0;
    cpu_q_dma_wr_pkt_vld = '0; cpu_q_dma_pkt_avail = '0; cpu_q_dma_rd_rdy = '0;
    thr = '{idle_timeout: 5, max_queue_len: 2000, max_pkt_num: 1, wait_timeout: 12500};
    repeat (4) @(posedge clk);
    rst_n = 1;

    // A: Low Power, sparse packets
    wait_mode(PM_SLEEP, 100);
    for (int i = 0; i < 20; i++) begin
      send($urandom_range(0, NP-1), $urandom_range(64, 1518));
      repeat ($urandom_range(2000, 4000)) @(posedge clk);
      checks++;
      if (forwarded != sent) fail("packet not forwarded in Low Power");
    end

    // B: DMA request while asleep
    wait_mode(PM_SLEEP, 100);
    @(negedge clk); dma_vld_c2n = 1;
    @(negedge clk); dma_vld_c2n = 0;
    wait_mode(PM_WORKING, 10);
    wait_mode(PM_SLEEP, 200);

    // C: CPU queue event during IDLE
    for (int i = 0; i < 3; i++) begin
      send(0, 200);
      wait_mode(PM_IDLE, 2000);
      @(negedge clk); cpu_q_dma_pkt_avail = 4'b0010;
      repeat (3) @(negedge clk);
      cpu_q_dma_pkt_avail = '0;
      wait_mode(PM_SLEEP, 200);
    end

    // D: register access while asleep; load the Save Power thresholds
    thr = '{idle_timeout: 5, max_queue_len: 5120, max_pkt_num: 127, wait_timeout: 12500000};
    reg_write(int'(REG_IDLE_TIMEOUT),  thr.idle_timeout);
    reg_write(int'(REG_MAX_QUEUE_LEN), thr.max_queue_len);
    reg_write(int'(REG_MAX_PKT_NUM),   thr.max_pkt_num);
    reg_write(int'(REG_WAIT_TIMEOUT),  thr.wait_timeout);
    reg_read(int'(REG_MAX_PKT_NUM), 127);
    wait_mode(PM_SLEEP, 200);

    // E: Save Power, bursts on all ports. Wait Timeout is cut to 20000
    // clocks so that the tail of each burst, which stays below the other
    // thresholds, does not wait the full 100 ms.
    thr.wait_timeout = 20000;
    reg_write(int'(REG_WAIT_TIMEOUT), thr.wait_timeout);
    wait_mode(PM_SLEEP, 200);
    for (int b = 0; b < 5; b++) begin
      for (int p = 0; p < NP; p++)
        for (int k = 0; k < 6; k++) send(p, 1500);
      drain(60000);
      checks++;
      if (forwarded != sent) fail("burst not forwarded");
      wait_mode(PM_SLEEP, 5000);
    end
    // E: one packet alone waits for Wait Timeout (shortened to 3000)
    thr.wait_timeout = 3000;
    reg_write(int'(REG_WAIT_TIMEOUT), thr.wait_timeout);
    wait_mode(PM_SLEEP, 200);
    begin
      int t0, t1;
      send(2, 100);
      while (rx_packet_count[2] == 0) @(posedge clk);
      t0 = n_cycles;
      while (pm_mode != 2'(PM_WORKING)) @(posedge clk);
      t1 = n_cycles;
      checks++;
      if (t1 - t0 < 3000 || t1 - t0 > 3003)
        fail($sformatf("wait-timeout wake after %0d clocks", t1 - t0));
      $display("single packet woke the core %0d clocks after it arrived", t1 - t0);
      drain(1000);
    end
    wait_mode(PM_SLEEP, 200);
    repeat (100) @(posedge clk);

    checks++;
    if (forwarded != sent) fail($sformatf("sent %0d forwarded %0d", sent, forwarded));
    $display("packets sent %0d forwarded %0d; asleep %0d of %0d clocks",
             sent, forwarded, n_sleep_cycles, n_cycles);
    $display("wake-ups: length %0d packets %0d wait %0d dma %0d; idle->working by core activity %0d; idle->sleep %0d; clock edges for registers in sleep %0d",
             n_wake_len, n_wake_pkt, n_wake_wait, n_wake_dma, n_idle_to_work_ws,
             n_idle_to_sleep, n_reg_clock_in_sleep);
    checks += 7;
    if (n_wake_len == 0) fail("no wake-up by queue length");
    if (n_wake_pkt == 0) fail("no wake-up by packet number");
    if (n_wake_wait == 0) fail("no wake-up by wait timeout");
    if (n_wake_dma == 0) fail("no wake-up by DMA");
    if (n_idle_to_work_ws == 0) fail("no IDLE->WORKING by core activity");
    if (n_idle_to_sleep == 0) fail("no IDLE->SLEEP");
    if (n_reg_clock_in_sleep == 0) fail("no register clocking in SLEEP");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
