// tb_ps2_shift_receiver: feeds whole frames as samples to the simple
// receiver and checks the register after every falling clock edge against
// a reference register, that the LEDs show the code after a full frame and
// that they change (flicker) while a frame arrives.
`timescale 1ns/1ps
module tb_ps2_shift_receiver;
  import ps2_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  ps2_sample_t smp;
  logic [7:0]  leds;
  logic [10:0] shreg, ref_sr;
  int checks = 0, failures = 0, flicker = 0;

  always #10 clk = ~clk;

  ps2_shift_receiver dut (.clk, .rst, .smp, .leds, .shreg);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One sample with the given clock and data level.
  task automatic sample(input logic c, input logic d);
    smp.clk_prev  <= smp.clk;
    smp.data_prev <= smp.data;
    smp.clk       <= c;
    smp.data      <= d;
    smp.valid     <= 1'b1;
    @(posedge clk);
    smp.valid <= 1'b0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0] bits;
    logic [7:0]  code, prev_leds;
    smp = '{valid: 1'b0, clk: 1'b1, data: 1'b1, clk_prev: 1'b1, data_prev: 1'b1};
    ref_sr = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);
    check(shreg == '0, "reset clears register");
    for (int f = 0; f < 40; f++) begin
      code = (f == 0) ? 8'hF0 : 8'($urandom);
      bits = {1'b1, ~(^code), code, 1'b0};
      prev_leds = leds;
      for (int i = 0; i < 11; i++) begin
        sample(1'b1, bits[i]);        // data set, clock high
        sample(1'b0, bits[i]);        // falling edge: shift
        ref_sr = {bits[i], ref_sr[10:1]};
        check(shreg == ref_sr, $sformatf("frame %0d bit %0d: %h exp %h", f, i, shreg, ref_sr));
        sample(1'b0, bits[i]);        // clock stays low: no shift
        check(shreg == ref_sr, "no shift without a falling edge");
        if (i < 10 && leds != prev_leds && leds != code) flicker++;
      end
      sample(1'b1, 1'b1);
      check(leds == code, $sformatf("frame %0d leds %h exp %h", f, leds, code));
    end
    check(flicker > 0, "LEDs change while a frame arrives");
    $display("flicker events %0d", flicker);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
