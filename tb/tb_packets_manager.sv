// tb_packets_manager: drives mac_grp_core_en, dma_vld_c2n and working_state
// in random bursts separated by quiet gaps of random length, with random
// idle timeouts, and compares the mode each clock with a model here. The
// model measures the IDLE stay by counting quiet clocks since the core
// went quiet rather than by mirroring the RTL counter. Every transition of
// the mode diagram, and a wake-up from SLEEP by each of the two wake
// sources, must be seen at least once.
module tb_packets_manager;
  import pm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mac = 0, dma = 0, ws = 0;
  logic [REG_W-1:0] idle_timeout;
  pm_mode_e mode;
  logic core_clk_packet_en;
  int checks = 0, failures = 0;
  int n_w2i = 0, n_i2w = 0, n_i2s = 0, n_s2w_mac = 0, n_s2w_dma = 0, n_ws_in_sleep = 0;

  packets_manager dut (.clk, .rst_n, .mac_grp_core_en(mac), .dma_vld_c2n(dma),
                       .working_state(ws), .idle_timeout, .mode, .core_clk_packet_en);

  always #4 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pm_mode_e exp, prev;
    int quiet;           // clocks spent in IDLE so far
    int stay;            // clocks the IDLE stay must last
    idle_timeout = 5;
    repeat (2) @(posedge clk);
    checks++; if (mode !== PM_WORKING || core_clk_packet_en !== 1) failures++;
    rst_n = 1;
    exp = PM_WORKING;
    quiet = 0;
    for (int i = 0; i < 60000; i++) begin
      @(negedge clk);
      if (i % 5000 == 0) idle_timeout = (i == 0) ? 5 : $urandom_range(0, 12);
      // mostly quiet, with bursts
      if ($urandom_range(0, 9) == 0) begin
        mac = ($urandom_range(0, 2) == 0);
        dma = ($urandom_range(0, 2) == 0);
        ws  = ($urandom_range(0, 1) == 0);
      end else begin
        mac = 0; dma = 0; ws = 0;
      end
      stay = (idle_timeout == 0) ? 1 : int'(idle_timeout);
      prev = exp;
      case (exp)
        PM_WORKING: if (!(mac | dma | ws)) begin exp = PM_IDLE; quiet = 0; end
        PM_IDLE: begin
          quiet++;
          if (mac | dma | ws) exp = PM_WORKING;
          else if (quiet >= stay) exp = PM_SLEEP;
        end
        PM_SLEEP: if (mac | dma) exp = PM_WORKING;
        default: ;
      endcase
      if (prev == PM_SLEEP && exp == PM_SLEEP && ws) n_ws_in_sleep++;
      if (prev == PM_WORKING && exp == PM_IDLE) n_w2i++;
      if (prev == PM_IDLE && exp == PM_WORKING) n_i2w++;
      if (prev == PM_IDLE && exp == PM_SLEEP) n_i2s++;
      if (prev == PM_SLEEP && exp == PM_WORKING && mac && !dma) n_s2w_mac++;
      if (prev == PM_SLEEP && exp == PM_WORKING && dma && !mac) n_s2w_dma++;
      @(posedge clk); #1;
      checks++;
      if (mode !== exp || core_clk_packet_en !== (exp != PM_SLEEP)) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: mode %s expected %s (timeout %0d)", i, mode.name(), exp.name(), idle_timeout);
      end
    end
    $display("W->I %0d I->W %0d I->S %0d S->W(mac) %0d S->W(dma) %0d ws ignored in sleep %0d",
             n_w2i, n_i2w, n_i2s, n_s2w_mac, n_s2w_dma, n_ws_in_sleep);
    checks += 6;
    if (n_w2i == 0) failures++;
    if (n_i2w == 0) failures++;
    if (n_i2s == 0) failures++;
    if (n_s2w_mac == 0) failures++;
    if (n_s2w_dma == 0) failures++;
    if (n_ws_in_sleep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
