// pm_registers: the power manager's software registers.
//
// Holds the four thresholds that set how long the switch may sleep:
// Idle Timeout, Max Queue Length, Max Packet Number and Wait Timeout, and
// hands them to the other sub-blocks as one pm_thresholds_t struct. Writing
// different values turns the same hardware into the "Low Power" or the
// "Save Power" configuration (or any other).
//
// Bus: a request is one cycle of reg_req with reg_rd_wr_L = 1 for a read and
// 0 for a write, a word address reg_addr (map in pm_pkg) and reg_wr_data.
// reg_ack answers every request one clock later, with reg_rd_data valid in
// the same cycle. The bus shape, the register map, the 32-bit width and the
// reset values (Low Power configuration) are this design's choices; the
// four registers and their meaning follow the design.
module pm_registers
  import pm_pkg::*;
#(
  parameter logic [REG_W-1:0] RST_IDLE_TIMEOUT  = LOW_POWER_IDLE_TIMEOUT,
  parameter logic [REG_W-1:0] RST_MAX_QUEUE_LEN = LOW_POWER_MAX_QUEUE_LEN,
  parameter logic [REG_W-1:0] RST_MAX_PKT_NUM   = LOW_POWER_MAX_PKT_NUM,
  parameter logic [REG_W-1:0] RST_WAIT_TIMEOUT  = LOW_POWER_WAIT_TIMEOUT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reg_req,
  input  logic              reg_rd_wr_L,
  input  logic [ADDR_W-1:0] reg_addr,
  input  logic [REG_W-1:0]  reg_wr_data,
  output logic              reg_ack,
  output logic [REG_W-1:0]  reg_rd_data,
  output pm_thresholds_t    thresholds
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thresholds.idle_timeout  <= RST_IDLE_TIMEOUT;
      thresholds.max_queue_len <= RST_MAX_QUEUE_LEN;
      thresholds.max_pkt_num   <= RST_MAX_PKT_NUM;
      thresholds.wait_timeout  <= RST_WAIT_TIMEOUT;
      reg_ack                  <= 1'b0;
      reg_rd_data              <= '0;
    end else begin
      reg_ack <= reg_req;
      if (reg_req && reg_rd_wr_L) begin
        unique case (pm_reg_addr_e'(reg_addr))
          REG_IDLE_TIMEOUT:  reg_rd_data <= thresholds.idle_timeout;
          REG_MAX_QUEUE_LEN: reg_rd_data <= thresholds.max_queue_len;
          REG_MAX_PKT_NUM:   reg_rd_data <= thresholds.max_pkt_num;
          REG_WAIT_TIMEOUT:  reg_rd_data <= thresholds.wait_timeout;
        endcase
      end
      if (reg_req && !reg_rd_wr_L) begin
        unique case (pm_reg_addr_e'(reg_addr))
          REG_IDLE_TIMEOUT:  thresholds.idle_timeout  <= reg_wr_data;
          REG_MAX_QUEUE_LEN: thresholds.max_queue_len <= reg_wr_data;
          REG_MAX_PKT_NUM:   thresholds.max_pkt_num   <= reg_wr_data;
          REG_WAIT_TIMEOUT:  thresholds.wait_timeout  <= reg_wr_data;
        endcase
      end
    end
  end

  // Every request is answered exactly one clock later.
  ack_follows_req: assert property (@(posedge clk) disable iff (!rst_n)
                                    reg_ack == $past(reg_req))
    else $error("reg_ack does not follow reg_req by one clock");

endmodule
