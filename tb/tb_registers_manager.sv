// tb_registers_manager: core_clk_reg_en must follow
// (work_reg_grp | pci_bus_dv) one clock later, for random inputs.
module tb_registers_manager;
  logic clk = 0, rst_n = 0;
  logic work_reg_grp = 0, pci_bus_dv = 0, core_clk_reg_en;
  int checks = 0, failures = 0;

  registers_manager dut (.clk, .rst_n, .work_reg_grp, .pci_bus_dv, .core_clk_reg_en);

  always #4 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    repeat (2) @(posedge clk);
    checks++; if (core_clk_reg_en !== 1'b0) failures++;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      work_reg_grp = ($urandom_range(0, 3) == 0);
      pci_bus_dv   = ($urandom_range(0, 3) == 0);
      exp = work_reg_grp | pci_bus_dv;
      @(posedge clk); #1;
      checks++;
      if (core_clk_reg_en !== exp) begin
        failures++;
        $display("mismatch at %0d: grp=%b dv=%b got %b", i, work_reg_grp, pci_bus_dv, core_clk_reg_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
