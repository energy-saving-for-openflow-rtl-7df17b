// queue_condition: decides, from the MAC receive queues, that buffered
// packets must now be forwarded.
//
// For every RX queue it compares three quantities with their thresholds:
//   rx_data_count   (bytes in the queue)       >= Max Queue Length
//   rx_packet_count (complete packets in it)   >= Max Packet Number
//   wait time of the first packet (clocks)     >= Wait Timeout
// and raises mac_grp_core_en when any of them holds for any queue. The
// comparisons and the three conditions follow the design. The wait timer of
// a queue starts when its first complete packet is counted (rx_packet_count
// leaves 0), counts one per clock, saturates, and clears when the queue is
// empty again. One timer per queue and the OR over NUM_PORTS queues are this
// design's choices. A threshold written as 0 always holds, which keeps the
// switch awake permanently.
//
// Timing: inputs are sampled on clk (the ungated clock); mac_grp_core_en is
// registered and rises one clock after a threshold is reached.
module queue_condition
  import pm_pkg::*;
#(
  parameter int unsigned NUM_PORTS   = 4,
  parameter int unsigned DATA_CNT_W  = 16,
  parameter int unsigned PKT_CNT_W   = 8,
  parameter int unsigned TIMER_W     = 24
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [NUM_PORTS-1:0][DATA_CNT_W-1:0] rx_data_count,
  input  logic [NUM_PORTS-1:0][PKT_CNT_W-1:0]  rx_packet_count,
  input  pm_thresholds_t                       thresholds,
  output logic                                 mac_grp_core_en
);

  logic [NUM_PORTS-1:0][TIMER_W-1:0] wait_time;
  logic [NUM_PORTS-1:0]              port_en;

  // Per-queue wait timer, running while the queue holds a complete packet.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_time <= '0;
    end else begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (rx_packet_count[p] == '0)
          wait_time[p] <= '0;
        else if (wait_time[p] != '1)
          wait_time[p] <= wait_time[p] + 1'b1;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      port_en[p] = (REG_W'(rx_data_count[p])   >= thresholds.max_queue_len) ||
                   (REG_W'(rx_packet_count[p]) >= thresholds.max_pkt_num)   ||
                   (REG_W'(wait_time[p])       >= thresholds.wait_timeout);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mac_grp_core_en <= 1'b0;
    else        mac_grp_core_en <= |port_en;
  end

endmodule
