// tb_ps2_sampler: checks that ps2_sampler takes a sample of both lines on
// each tick, keeps the previous sample and raises valid one cycle after the
// tick. The lines change only well away from ticks, so the expected sample
// is the line level at the tick.
`timescale 1ns/1ps
module tb_ps2_sampler;
  import ps2_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic tick = 1'b0, lc = 1'b1, ld = 1'b1;
  ps2_sample_t smp;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  ps2_sampler dut (.clk, .rst, .tick, .ps2_clk_in(lc), .ps2_data_in(ld), .smp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_c, exp_d, prev_c, prev_d;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);
    check(smp.clk && smp.data && smp.clk_prev && smp.data_prev && !smp.valid, "reset state");
    prev_c = 1'b1; prev_d = 1'b1;
    for (int n = 0; n < 200; n++) begin
      // new line levels, then let them settle through the synchronizer
      lc = 1'($urandom);
      ld = 1'($urandom);
      exp_c = lc; exp_d = ld;
      repeat (4) @(posedge clk);
      // between ticks the sample must not move
      check(smp.clk == prev_c && smp.data == prev_d, "sample held between ticks");
      tick <= 1'b1;
      @(posedge clk);
      tick <= 1'b0;
      #1;
      check(smp.valid, "valid one cycle after tick");
      check(smp.clk == exp_c && smp.data == exp_d,
            $sformatf("sample %0d: got %b%b exp %b%b", n, smp.clk, smp.data, exp_c, exp_d));
      check(smp.clk_prev == prev_c && smp.data_prev == prev_d, "previous sample kept");
      @(posedge clk);
      #1;
      check(!smp.valid, "valid is one cycle wide");
      prev_c = exp_c; prev_d = exp_d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
