// pm_pkg: types and constants shared by the Balance Switch power manager.
//
// The three operating modes (WORKING, IDLE, SLEEP) are the ones the design
// defines for the switch. The register map, the register width and the
// reset values are this design's own choices: the reset thresholds are the
// "Low Power" configuration (Idle Timeout 5 clocks, Max Queue Length 2000
// bytes, Max Packet Number 1, Wait Timeout 12500 clocks).
package pm_pkg;

  // Software registers are 32 bits wide, as on the NetFPGA register bus.
  localparam int unsigned REG_W  = 32;
  localparam int unsigned ADDR_W = 2;

  // Register map (word addresses inside the power manager block).
  typedef enum logic [ADDR_W-1:0] {
    REG_IDLE_TIMEOUT   = 2'd0,
    REG_MAX_QUEUE_LEN  = 2'd1,
    REG_MAX_PKT_NUM    = 2'd2,
    REG_WAIT_TIMEOUT   = 2'd3
  } pm_reg_addr_e;

  // Operating modes of the switch.
  typedef enum logic [1:0] {
    PM_WORKING = 2'd0,
    PM_IDLE    = 2'd1,
    PM_SLEEP   = 2'd2
  } pm_mode_e;

  // Threshold set delivered by the registers to the other sub-blocks.
  typedef struct packed {
    logic [REG_W-1:0] idle_timeout;     // clocks in IDLE before SLEEP
    logic [REG_W-1:0] max_queue_len;    // bytes in an RX queue
    logic [REG_W-1:0] max_pkt_num;      // packets in an RX queue
    logic [REG_W-1:0] wait_timeout;     // clocks since first packet
  } pm_thresholds_t;

  // Reset values: the Low Power configuration.
  localparam logic [REG_W-1:0] LOW_POWER_IDLE_TIMEOUT  = 32'd5;
  localparam logic [REG_W-1:0] LOW_POWER_MAX_QUEUE_LEN = 32'd2000;
  localparam logic [REG_W-1:0] LOW_POWER_MAX_PKT_NUM   = 32'd1;
  localparam logic [REG_W-1:0] LOW_POWER_WAIT_TIMEOUT  = 32'd12500;

  // The Save Power configuration, for reference by software and tests.
  localparam logic [REG_W-1:0] SAVE_POWER_IDLE_TIMEOUT  = 32'd5;
  localparam logic [REG_W-1:0] SAVE_POWER_MAX_QUEUE_LEN = 32'd5120;
  localparam logic [REG_W-1:0] SAVE_POWER_MAX_PKT_NUM   = 32'd127;
  localparam logic [REG_W-1:0] SAVE_POWER_WAIT_TIMEOUT  = 32'd12500000;

endpackage
