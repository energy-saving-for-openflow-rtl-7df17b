// tb_clock_controller: a 125 MHz clock (8 ns) is gated by an enable that
// changes at random rising edges. Every rising edge of the gated clock must
// coincide with a rising edge of the input clock, every high pulse must be
// a full 4 ns, and the number of gated edges must equal the number of
// enabled cycles counted here: an enable set before a falling edge lets the
// next rising edge through.
module tb_clock_controller;
  logic clk = 0, rst_n = 0, en = 1, gclk;
  int checks = 0, failures = 0;
  int exp_edges = 0, got_edges = 0, off_cycles = 0;
  realtime t_rise;
  logic en_at_fall = 1;

  clock_controller dut (.core_clk_in(clk), .rst_n, .core_clk_en(en), .core_clk_int(gclk));

  always #4 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) en_at_fall <= en;

  always @(posedge gclk) begin
    t_rise = $realtime;
    got_edges++;
    checks++;
    if (clk !== 1'b1) begin
      failures++;
      $display("gated rising edge without input rising edge at %0t", $realtime);
    end
  end

  always @(negedge gclk) begin
    checks++;
    if ($realtime - t_rise != 4.0) begin
      failures++;
      $display("short pulse at %0t", $realtime);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    got_edges = 0;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      if (rst_n && en_at_fall) exp_edges++;
      if (!en_at_fall) off_cycles++;
      #1 en = ($urandom_range(0, 2) != 0);
    end
    @(posedge clk);
    if (en_at_fall) exp_edges++;
    #1;
    checks++;
    if (got_edges != exp_edges) begin
      failures++;
      $display("gated edges %0d expected %0d", got_edges, exp_edges);
    end
    checks++;
    if (off_cycles == 0) failures++;
    $display("edges %0d, gated-off cycles %0d", got_edges, off_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
