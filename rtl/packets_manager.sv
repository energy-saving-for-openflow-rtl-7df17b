// packets_manager: the WORKING / IDLE / SLEEP mode controller.
//
// Modes and transitions follow the design:
//   WORKING -> IDLE    when mac_grp_core_en, dma_vld_c2n and working_state
//                      are all 0 (no traffic to process)
//   IDLE    -> WORKING when any of the three is 1
//   IDLE    -> SLEEP   when the idle time reaches Idle Timeout
//   SLEEP   -> WORKING when mac_grp_core_en or dma_vld_c2n is 1
// working_state cannot wake a sleeping switch: the blocks that drive it have
// no clock in SLEEP. core_clk_packet_en is 1 in WORKING and IDLE and 0 in
// SLEEP. The idle timer counts the clocks spent in IDLE; the switch stays
// in IDLE for exactly idle_timeout clocks (at least one) before it sleeps.
// Reset into WORKING, the timer width and the exact count are this design's
// choices.
//
// Timing: one state register on the ungated clock; core_clk_packet_en is
// decoded from it, so it changes one clock after the inputs.
module packets_manager
  import pm_pkg::*;
#(
  parameter int unsigned IDLE_CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mac_grp_core_en,
  input  logic             dma_vld_c2n,
  input  logic             working_state,
  input  logic [REG_W-1:0] idle_timeout,
  output pm_mode_e         mode,
  output logic             core_clk_packet_en
);

  pm_mode_e              mode_next;
  logic [IDLE_CNT_W-1:0] idle_cnt, idle_cnt_next;
  logic                  wake, busy, idle_done;

  always_comb begin
    wake      = mac_grp_core_en | dma_vld_c2n;
    busy      = wake | working_state;
    idle_done = (REG_W'(idle_cnt) + REG_W'(1)) >= idle_timeout;
    mode_next     = mode;
    idle_cnt_next = idle_cnt;
    unique case (mode)
      PM_WORKING: begin
        if (!busy) begin
          mode_next     = PM_IDLE;
          idle_cnt_next = '0;
        end
      end
      PM_IDLE: begin
        if (busy)           mode_next = PM_WORKING;
        else if (idle_done) mode_next = PM_SLEEP;
        else                idle_cnt_next = idle_cnt + 1'b1;
      end
      PM_SLEEP: begin
        if (wake) mode_next = PM_WORKING;
      end
      default: mode_next = PM_WORKING;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= PM_WORKING;
      idle_cnt <= '0;
    end else begin
      mode     <= mode_next;
      idle_cnt <= idle_cnt_next;
    end
  end

  assign core_clk_packet_en = (mode != PM_SLEEP);

  // SLEEP is only entered from IDLE and only left towards WORKING.
  sleep_from_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                    (mode == PM_SLEEP && $past(mode) != PM_SLEEP) |-> $past(mode) == PM_IDLE)
    else $error("SLEEP entered from a mode other than IDLE");
  sleep_to_working: assert property (@(posedge clk) disable iff (!rst_n)
                                     ($past(mode) == PM_SLEEP && mode != PM_SLEEP) |-> mode == PM_WORKING)
    else $error("SLEEP left towards a mode other than WORKING");

endmodule
