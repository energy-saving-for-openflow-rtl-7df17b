// tb_pm_registers: reads the reset values (the Low Power thresholds),
// writes the Save Power thresholds and random values, reads them back, and
// checks that the thresholds struct shows each register and that reg_ack
// answers every request exactly one clock later.
module tb_pm_registers;
  import pm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_req = 0, reg_rd_wr_L = 0;
  logic [ADDR_W-1:0] reg_addr = '0;
  logic [REG_W-1:0] reg_wr_data = '0, reg_rd_data;
  logic reg_ack;
  pm_thresholds_t thresholds;
  logic [REG_W-1:0] model [4];
  int checks = 0, failures = 0;

  pm_registers dut (.clk, .rst_n, .reg_req, .reg_rd_wr_L, .reg_addr, .reg_wr_data,
                    .reg_ack, .reg_rd_data, .thresholds);

  always #4 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [REG_W-1:0] got, input logic [REG_W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic access(input logic rd, input int a, input logic [REG_W-1:0] d,
                        output logic [REG_W-1:0] q);
    @(negedge clk);
    reg_req = 1; reg_rd_wr_L = rd; reg_addr = ADDR_W'(a); reg_wr_data = d;
    check(REG_W'(reg_ack), 0, "ack in request cycle");
    @(posedge clk); #1;
    check(REG_W'(reg_ack), 1, "ack one clock later");
    q = reg_rd_data;
    @(negedge clk);
    reg_req = 0;
    @(posedge clk); #1;
    check(REG_W'(reg_ack), 0, "ack is one cycle");
  endtask

  task automatic check_struct();
    check(thresholds.idle_timeout,  model[0], "struct idle_timeout");
    check(thresholds.max_queue_len, model[1], "struct max_queue_len");
    check(thresholds.max_pkt_num,   model[2], "struct max_pkt_num");
    check(thresholds.wait_timeout,  model[3], "struct wait_timeout");
  endtask

  initial begin
    logic [REG_W-1:0] q, d;
    model[0] = 5; model[1] = 2000; model[2] = 1; model[3] = 12500;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_struct();
    for (int a = 0; a < 4; a++) begin
      access(1, a, '0, q);
      check(q, model[a], "reset value read");
    end
    // Save Power configuration
    model[0] = 5; model[1] = 5120; model[2] = 127; model[3] = 12500000;
    for (int a = 0; a < 4; a++) access(0, a, model[a], q);
    check_struct();
    for (int a = 0; a < 4; a++) begin
      access(1, a, '0, q);
      check(q, model[a], "save power read");
    end
    // random traffic
    for (int i = 0; i < 300; i++) begin
      int a = $urandom_range(0, 3);
      if ($urandom_range(0, 1) == 0) begin
        d = $urandom();
        access(0, a, d, q);
        model[a] = d;
      end else begin
        access(1, a, '0, q);
        check(q, model[a], "random read");
      end
      check_struct();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
