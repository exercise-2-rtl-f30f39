// tb_error_counter: random increments against a reference count, including
// wrap-around from 255 to 0 and a reset in the middle.
`timescale 1ns/1ps
module tb_error_counter;
  logic clk = 1'b0, rst = 1'b1, inc = 1'b0;
  logic [7:0] count;
  int checks = 0, failures = 0, wraps = 0;
  int unsigned ref_cnt;

  always #10 clk = ~clk;

  error_counter #(.WIDTH(8)) dut (.clk, .rst, .inc, .count);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    ref_cnt = 0;
    for (int n = 0; n < 2000; n++) begin
      inc <= (n < 600) ? 1'b1 : 1'($urandom);
      if (n == 1500) rst <= 1'b1;
      else           rst <= 1'b0;
      @(posedge clk);
      if (rst)      ref_cnt = 0;
      else if (inc) ref_cnt = (ref_cnt + 1) % 256;
      if (inc && !rst && ref_cnt == 0) wraps++;
      #1;
      checks++;
      if (count != 8'(ref_cnt)) begin
        failures++;
        $display("FAIL n=%0d count=%0d exp=%0d", n, count, ref_cnt);
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
