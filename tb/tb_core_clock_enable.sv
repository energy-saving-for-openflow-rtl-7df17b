// tb_core_clock_enable: core_clk_en must be 1 during reset and then follow
// (core_clk_packet_en | core_clk_reg_en) one clock later; all four input
// combinations are applied repeatedly.
module tb_core_clock_enable;
  logic clk = 0, rst_n = 0;
  logic pkt_en = 0, reg_en = 0, core_clk_en;
  int checks = 0, failures = 0;

  core_clock_enable dut (.clk, .rst_n, .core_clk_packet_en(pkt_en),
                         .core_clk_reg_en(reg_en), .core_clk_en);

  always #4 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (core_clk_en !== 1'b1) failures++;
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      {pkt_en, reg_en} = 2'(i % 4) ^ 2'($urandom_range(0, 3) == 0);
      @(posedge clk); #1;
      checks++;
      if (core_clk_en !== (pkt_en | reg_en)) begin
        failures++;
        $display("mismatch: pkt=%b reg=%b got %b", pkt_en, reg_en, core_clk_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
