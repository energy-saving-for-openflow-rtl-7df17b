// tb_system_states: random stimulus for system_states.
// Each clock the UDP and CPU queue strobes are randomised (each bit mostly
// 0, so that idle cycles occur) and working_state is compared one clock
// later with the OR of the four signal groups computed here.
module tb_system_states;
  logic clk = 0, rst_n = 0;
  logic udp_in_wr, vlan_remover_out_wr, lpl_in_fifo_empty, vlan_adder_out_wr, udp_out_wr;
  logic [3:0] wr_pkt_vld, dma_wr, pkt_avail, rd_rdy;
  logic working_state;
  int checks = 0, failures = 0, n_busy = 0, n_idle = 0;

  system_states dut (
    .clk, .rst_n, .udp_in_wr, .vlan_remover_out_wr, .lpl_in_fifo_empty,
    .vlan_adder_out_wr, .udp_out_wr, .cpu_q_dma_wr_pkt_vld(wr_pkt_vld),
    .cpu_q_dma_wr(dma_wr), .cpu_q_dma_pkt_avail(pkt_avail), .cpu_q_dma_rd_rdy(rd_rdy),
    .working_state
  );

  always #4 clk = ~clk;

  function automatic logic rare();
    return ($urandom_range(0, 39) == 0);
  endfunction

  function automatic logic [3:0] rare4();
    return {rare(), rare(), rare(), rare()};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    {udp_in_wr, vlan_remover_out_wr, vlan_adder_out_wr, udp_out_wr} = '0;
    lpl_in_fifo_empty = 1'b1;
    {wr_pkt_vld, dma_wr, pkt_avail, rd_rdy} = '0;
    repeat (3) @(posedge clk);
    if (working_state !== 1'b0) failures++;
    checks++;
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      udp_in_wr           = rare();
      vlan_remover_out_wr = rare();
      lpl_in_fifo_empty   = ~rare();
      vlan_adder_out_wr   = rare();
      udp_out_wr          = rare();
      wr_pkt_vld = rare4(); dma_wr = rare4(); pkt_avail = rare4(); rd_rdy = rare4();
      exp = udp_in_wr || vlan_remover_out_wr || !lpl_in_fifo_empty || vlan_adder_out_wr ||
            udp_out_wr || (wr_pkt_vld != 0) || (dma_wr != 0) || (pkt_avail != 0) || (rd_rdy != 0);
      @(posedge clk); #1;
      checks++;
      if (working_state !== exp) begin
        failures++;
        $display("mismatch at %0d: got %b exp %b", i, working_state, exp);
      end
      if (exp) n_busy++; else n_idle++;
    end
    if (n_busy == 0 || n_idle == 0) failures++;
    checks++;
    $display("busy cycles %0d idle cycles %0d", n_busy, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
