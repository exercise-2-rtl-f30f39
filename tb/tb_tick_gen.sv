// tb_tick_gen: checks the tick period and width of tick_gen at two ratios.
`timescale 1ns/1ps
module tb_tick_gen;
  logic clk = 1'b0, rst = 1'b1;
  logic tick_a, tick_b;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  tick_gen #(.CLK_HZ(1_000_000), .TICK_HZ(100_000)) dut_a (.clk, .rst, .tick(tick_a));
  tick_gen #(.CLK_HZ(50_000_000), .TICK_HZ(100_000)) dut_b (.clk, .rst, .tick(tick_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_a, last_b, cyc, n_a, n_b;
    cyc = 0; n_a = 0; n_b = 0; last_a = -1; last_b = -1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    while (n_b < 4) begin
      @(posedge clk);
      cyc++;
      if (tick_a) begin
        if (last_a < 0) check(cyc == 10, $sformatf("first tick_a at %0d", cyc));
        else            check(cyc - last_a == 10, $sformatf("tick_a period %0d", cyc - last_a));
        last_a = cyc;
        n_a++;
      end
      if (tick_b) begin
        if (last_b < 0) check(cyc == 500, $sformatf("first tick_b at %0d", cyc));
        else            check(cyc - last_b == 500, $sformatf("tick_b period %0d", cyc - last_b));
        last_b = cyc;
        n_b++;
      end
    end
    check(n_a == 200, $sformatf("tick_a count %0d", n_a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
