// tb_queue_condition: four receive queues fill and drain at random while the
// thresholds change between runs (Low Power, Save Power and small random
// sets). A model here keeps its own wait timer per queue (time since the
// packet count left zero) and predicts mac_grp_core_en one clock after the
// counts. Each of the three trigger conditions must be seen at least once.
module tb_queue_condition;
  import pm_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0][15:0] rx_data_count;
  logic [NP-1:0][7:0]  rx_packet_count;
  pm_thresholds_t thr;
  logic mac_grp_core_en;
  int checks = 0, failures = 0;
  int n_by_len = 0, n_by_pkt = 0, n_by_wait = 0, n_quiet = 0;
  int since_first [NP];

  queue_condition dut (
    .clk, .rst_n, .rx_data_count, .rx_packet_count, .thresholds(thr), .mac_grp_core_en
  );

  always #4 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int cycles, input int fill_pct);
    for (int c = 0; c < cycles; c++) begin
      bit exp, by_len, by_pkt, by_wait;
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        // a packet of 64..1518 bytes completes, or the core drains one
        if ($urandom_range(0, 99) < fill_pct && rx_packet_count[p] < 200 && rx_data_count[p] < 60000) begin
          rx_packet_count[p] += 1;
          rx_data_count[p]   += 16'($urandom_range(64, 1518));
        end else if ($urandom_range(0, 99) < 2 && rx_packet_count[p] != 0) begin
          rx_packet_count[p] = 0;
          rx_data_count[p]   = 0;
        end
      end
      by_len = 0; by_pkt = 0; by_wait = 0;
      for (int p = 0; p < NP; p++) begin
        if (rx_data_count[p] >= thr.max_queue_len) by_len = 1;
        if (rx_packet_count[p] >= thr.max_pkt_num) by_pkt = 1;
        if (since_first[p] >= thr.wait_timeout) by_wait = 1;
      end
      exp = by_len | by_pkt | by_wait;
      @(posedge clk);
      for (int p = 0; p < NP; p++)
        since_first[p] = (rx_packet_count[p] == 0) ? 0 : since_first[p] + 1;
      #1;
      checks++;
      if (mac_grp_core_en !== exp) begin
        failures++;
        if (failures < 10) $display("cycle %0d: got %b expected %b", c, mac_grp_core_en, exp);
      end
      if (by_len) n_by_len++;
      if (by_pkt) n_by_pkt++;
      if (by_wait && !by_len && !by_pkt) n_by_wait++;
      if (!exp) n_quiet++;
    end
  endtask

  initial begin
    rx_data_count = '0; rx_packet_count = '0;
    foreach (since_first[p]) since_first[p] = 0;
    thr = '{idle_timeout: 5, max_queue_len: 2000, max_pkt_num: 1, wait_timeout: 12500};
    repeat (2) @(posedge clk);
    checks++; if (mac_grp_core_en !== 0) failures++;
    rst_n = 1;
    run(3000, 1);
    thr = '{idle_timeout: 5, max_queue_len: 5120, max_pkt_num: 127, wait_timeout: 12500000};
    run(3000, 1);
    for (int k = 0; k < 20; k++) begin
      thr.max_queue_len = $urandom_range(1000, 20000);
      thr.max_pkt_num   = $urandom_range(2, 40);
      thr.wait_timeout  = $urandom_range(5, 200);
      run(2000, $urandom_range(0, 3));
    end
    $display("by length %0d, by packets %0d, by wait only %0d, quiet %0d",
             n_by_len, n_by_pkt, n_by_wait, n_quiet);
    checks += 4;
    if (n_by_len == 0) failures++;
    if (n_by_pkt == 0) failures++;
    if (n_by_wait == 0) failures++;
    if (n_quiet == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
