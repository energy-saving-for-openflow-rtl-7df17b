// tb_power_modes_workload: the two threshold settings of the Balance Switch
// under the throughput sweep 0, 10, 50, 100, 300, 500, 700, 900 and
// 1000 Mbit/s, with every parameter of the design at its default.
//
//   Low Power : Idle Timeout 5, Max Queue Length 2000 bytes,
//               Max Packet Number 1, Wait Timeout 12500 clocks (100 us)
//   Save Power: Idle Timeout 5, Max Queue Length 5120 bytes,
//               Max Packet Number 127, Wait Timeout 12500000 clocks (100 ms)
//
// Traffic enters one port as 1000-byte packets at evenly spaced times,
// received at 1 byte per clock (1 Gbit/s line rate at 125 MHz). A switch
// core model on the gated clock reads packets at 8 bytes per clock. For
// each setting and rate the test runs WINDOW clocks and reports the share
// of clocks in which the core clock was stopped. It checks:
//  - no packet is lost and no receive queue exceeds 8096 bytes;
//  - in Low Power, the core starts reading each packet at most 5 clocks
//    after its last byte arrived (the wake-up costs 3 to 4 clocks);
//  - the stopped share never rises with the rate (beyond 0.1%, the cost of
//    the register writes that start a run), and Save Power stops the clock
//    at least as much as Low Power at every rate;
//  - a line-rate stream of 64-byte packets (about 50 idle clocks between
//    packets) never puts the switch to sleep with Idle Timeout 100 and does
//    so between every two packets with Idle Timeout 20;
//  - with the full Save Power Wait Timeout, a single packet is held exactly
//    12500000 clocks (+ the 3-clock pipeline) before the core wakes.
module tb_power_modes_workload;
  import pm_pkg::*;
  localparam int WINDOW = 200000;
  localparam int PKT = 1000;
  localparam int RXQ_BYTES = 8096;
  localparam int NRATES = 9;
  localparam int RATES [NRATES] = '{0, 10, 50, 100, 300, 500, 700, 900, 1000};

  logic clk = 0, rst_n = 0;
  logic udp_in_wr = 0;
  logic dma_vld_c2n = 0, work_reg_grp = 0, pci_bus_dv = 0;
  logic [3:0][15:0] rx_data_count;
  logic [3:0][7:0]  rx_packet_count;
  logic reg_req = 0, reg_rd_wr_L = 0, reg_ack;
  logic [ADDR_W-1:0] reg_addr = '0;
  logic [REG_W-1:0] reg_wr_data = '0, reg_rd_data;
  logic core_clk_en, core_clk_int;
  logic [1:0] pm_mode;

  balance_switch_top dut (
    .gtx_clk(clk), .core_clk(clk), .rst_n,
    .udp_in_wr, .vlan_remover_out_wr(1'b0), .lpl_in_fifo_empty(1'b1),
    .vlan_adder_out_wr(1'b0), .udp_out_wr(1'b0),
    .cpu_q_dma_wr_pkt_vld(4'b0), .cpu_q_dma_wr(4'b0), .cpu_q_dma_pkt_avail(4'b0),
    .cpu_q_dma_rd_rdy(4'b0),
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
    repeat (20000000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receive side, port 0 only
  longint cyc = 0;
  int arr_bytes = 0, arr_pkts = 0, con_bytes = 0, con_pkts = 0;
  int rx_left = 0, pending = 0;
  int cur_len = PKT;            // length of the packets being sent
  longint done_at [$];          // completion clock of packets in the queue
  int lens [$];                 // their lengths
  int sent = 0, forwarded = 0, max_start_delay = 0;

  assign rx_data_count   = {48'b0, 16'(arr_bytes - con_bytes)};
  assign rx_packet_count = {24'b0, 8'(arr_pkts - con_pkts)};

  always @(posedge clk) begin
    cyc++;
    if (rx_left == 0 && pending > 0) begin
      pending--;
      rx_left = cur_len;
    end
    if (rx_left != 0) begin
      arr_bytes <= arr_bytes + 1;
      rx_left--;
      if (rx_left == 0) begin
        arr_pkts <= arr_pkts + 1;
        done_at.push_back(cyc);
        lens.push_back(cur_len);
      end
    end
    checks++;
    if (arr_bytes - con_bytes > RXQ_BYTES) fail("receive queue overflow");
  end

  // switch core model on the gated clock
  int cur_left = 0;
  always @(posedge core_clk_int) begin
    if (cur_left == 0 && arr_pkts - con_pkts > 0) begin
      longint d;
      d = cyc - done_at.pop_front();
      if (d > max_start_delay) max_start_delay = int'(d);
      cur_left = lens.pop_front();
    end
    udp_in_wr <= (cur_left != 0);
    if (cur_left != 0) begin
      con_bytes <= con_bytes + ((cur_left < 8) ? cur_left : 8);
      cur_left -= (cur_left < 8) ? cur_left : 8;
      if (cur_left == 0) begin
        con_pkts <= con_pkts + 1;
        forwarded++;
      end
    end
  end

  // stopped-clock accounting
  int gated = 0, sleeps = 0;
  logic [1:0] mode_q = 2'(PM_WORKING);
  always @(posedge clk) begin
    if (!dut.u_clock_controller.en_q) gated++;
    if (mode_q == 2'(PM_IDLE) && pm_mode == 2'(PM_SLEEP)) sleeps++;
    mode_q <= pm_mode;
  end

  // Sends n packets of len bytes back to back at line rate and returns how
  // often the switch fell asleep meanwhile.
  task automatic stream(input int n, input int len, output int slept);
    int s0;
    s0 = sleeps;
    cur_len = len;
    @(negedge clk);
    pending += n; sent += n;
    while (pending != 0 || rx_left != 0) @(posedge clk);
    slept = sleeps - s0;
    while (forwarded != sent) @(posedge clk);
    repeat (50) @(posedge clk);
    cur_len = PKT;
  endtask

  task automatic reg_write(input pm_reg_addr_e a, input logic [REG_W-1:0] d);
    @(negedge clk);
    pci_bus_dv = 1; reg_req = 1; reg_rd_wr_L = 0; reg_addr = a; reg_wr_data = d;
    @(negedge clk);
    reg_req = 0; pci_bus_dv = 0;
  endtask

  task automatic set_mode(input bit save);
    reg_write(REG_IDLE_TIMEOUT,  save ? SAVE_POWER_IDLE_TIMEOUT  : LOW_POWER_IDLE_TIMEOUT);
    reg_write(REG_MAX_QUEUE_LEN, save ? SAVE_POWER_MAX_QUEUE_LEN : LOW_POWER_MAX_QUEUE_LEN);
    reg_write(REG_MAX_PKT_NUM,   save ? SAVE_POWER_MAX_PKT_NUM   : LOW_POWER_MAX_PKT_NUM);
    reg_write(REG_WAIT_TIMEOUT,  save ? SAVE_POWER_WAIT_TIMEOUT  : LOW_POWER_WAIT_TIMEOUT);
  endtask

  // Runs one rate for WINDOW clocks; returns the stopped share in 1/10000.
  task automatic run_rate(input int mbps, output int share);
    int period, t, g0;
    period = (mbps == 0) ? 0 : (PKT * 1000) / mbps;   // clocks between packets
    g0 = gated;
    t = 0;
    for (int c = 0; c < WINDOW; c++) begin
      @(negedge clk);
      if (period != 0 && t == 0) begin pending++; sent++; end
      if (period != 0) t = (t + 1) % period;
    end
    share = int'((longint'(gated - g0) * 10000) / WINDOW);
  endtask

  task automatic flush(input int limit);
    int n = 0;
    while ((forwarded != sent) && n < limit) begin @(posedge clk); n++; end
  endtask

  initial begin
    int share [2][NRATES];
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      set_mode(m == 1);
      for (int r = 0; r < NRATES; r++) begin
        max_start_delay = 0;
        run_rate(RATES[r], share[m][r]);
        $display("%s %4d Mbit/s: core clock stopped %0d.%02d%% of the time, longest wait before reading %0d clocks",
                 m ? "Save Power" : "Low Power ", RATES[r], share[m][r] / 100, share[m][r] % 100,
                 max_start_delay);
        if (m == 0) begin
          checks++;
          if (max_start_delay > 5) fail("Low Power start delay above 5 clocks");
        end
        if (r > 0) begin
          checks++;
          if (share[m][r] > share[m][r-1] + 10) fail("stopped share rose with the rate");
        end
      end
      // let the tail drain: Low Power wakes at once; Save Power needs a
      // threshold, so use a short Wait Timeout for the flush
      if (m == 1) reg_write(REG_WAIT_TIMEOUT, 1000);
      flush(100000);
      checks++;
      if (forwarded != sent) fail($sformatf("sent %0d forwarded %0d", sent, forwarded));
    end
    for (int r = 0; r < NRATES; r++) begin
      checks++;
      if (share[1][r] < share[0][r]) fail($sformatf("Save Power stops less at %0d Mbit/s", RATES[r]));
    end

    // Sleep between packets happens only when the gap between them exceeds
    // processing time plus Idle Timeout. 64-byte packets at line rate
    // leave about 50 idle clocks between packets in Low Power.
    set_mode(0);
    begin
      int slept;
      reg_write(REG_IDLE_TIMEOUT, 100);
      repeat (50) @(posedge clk);
      stream(20, 64, slept);
      $display("64-byte stream, Idle Timeout 100: fell asleep %0d times", slept);
      checks++;
      if (slept != 0) fail("slept although the gaps are shorter than Idle Timeout");
      reg_write(REG_IDLE_TIMEOUT, 20);
      repeat (50) @(posedge clk);
      stream(20, 64, slept);
      $display("64-byte stream, Idle Timeout 20: fell asleep %0d times", slept);
      checks++;
      if (slept < 19) fail("did not sleep in gaps longer than Idle Timeout");
    end
    set_mode(1);

    // the full 100 ms Save Power Wait Timeout on one packet
    reg_write(REG_WAIT_TIMEOUT, SAVE_POWER_WAIT_TIMEOUT);
    repeat (50) @(posedge clk);
    begin
      longint t0;
      @(negedge clk); pending++; sent++;
      while (arr_pkts == con_pkts) @(posedge clk);
      t0 = cyc;
      while (pm_mode != 2'(PM_WORKING)) @(posedge clk);
      checks++;
      if (cyc - t0 != 64'(SAVE_POWER_WAIT_TIMEOUT) + 2)
        fail($sformatf("held %0d clocks", cyc - t0));
      $display("single packet held %0d clocks (%0d ms at 125 MHz) before wake-up",
               cyc - t0, (cyc - t0) / 125000);
      flush(1000);
      checks++;
      if (forwarded != sent) fail("held packet not forwarded");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
