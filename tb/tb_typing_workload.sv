// tb_typing_workload: five different keys typed on the whole receiver the
// way a keyboard sends them: each key's scan code, two typematic repeats
// about 100 ms apart while it is held, then F0 and the code on release.
// Each key uses one corner of the PS/2 timing range (T_CK 30 or 50 us,
// T_SU 5 or 25 us). The board clock is lowered to 1 MHz to keep the
// simulated 1.5 s short; the 100 kHz sampling is unchanged. Checks after
// every frame: latched LEDs, key LED, no error LED, error count 0, and the
// display digits of the scan code while the key is held.
`timescale 1ns/1ps
module tb_typing_workload;
  logic clk = 1'b0, rst = 1'b1;
  logic ps2_clk, ps2_data;
  logic [7:0] led_raw, led_code;
  logic led_error, led_key;
  logic [6:0] seg;
  logic [3:0] an;
  logic la_clk, la_data;
  int checks = 0, failures = 0, frames = 0;

  always #500 clk = ~clk;   // 1 MHz

  ps2_device_model dev (.ps2_clk, .ps2_data);

  ps2_keyboard_top #(.CLK_HZ(1_000_000), .SAMPLE_HZ(100_000), .REFRESH_HZ(1_000)) dut (
    .clk, .rst, .ps2_clk, .ps2_data, .led_raw, .led_code, .led_error, .led_key,
    .seg, .an, .la_clk, .la_data);

  // Five keys of a US layout: A, S, D, F, space (set-2 scan codes).
  logic [7:0] keys[5] = '{8'h1C, 8'h1B, 8'h23, 8'h2B, 8'h29};
  int unsigned corner_half[4] = '{15_000, 25_000, 15_000, 25_000};
  int unsigned corner_tsu[4]  = '{5_000, 5_000, 15_000, 25_000};
  logic [6:0] glyph[16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                            7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic send_checked(input logic [7:0] c, input logic [7:0] exp_led, input bit exp_key,
                              input int unsigned gap_ns);
    dev.send(c, 0, gap_ns);
    frames++;
    check(led_code == exp_led, $sformatf("LEDs %h exp %h", led_code, exp_led));
    check(led_key == exp_key, $sformatf("key LED %b exp %b after %h", led_key, exp_key, c));
    check(!led_error && dut.err_count == 8'd0, "no protocol error");
  endtask

  // While a key is held, digits 3 and 2 must show its code.
  task automatic check_display(input logic [7:0] c);
    bit ok3 = 0, ok2 = 0;
    repeat (5000) begin
      @(posedge clk);
      if (!an[3] && ~seg == glyph[c[7:4]]) ok3 = 1;
      if (!an[2] && ~seg == glyph[c[3:0]]) ok2 = 1;
    end
    check(ok3 && ok2, $sformatf("display shows %h", c));
  endtask

  initial begin
    #3_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 5; k++) begin
      dev.half_ns = corner_half[k % 4];
      dev.tsu_ns  = corner_tsu[k % 4];
      send_checked(keys[k], keys[k], 1'b1, 1_000_000);
      check_display(keys[k]);
      repeat (2) begin
        #(99_000_000ns);                       // typematic repeat, about 100 ms
        send_checked(keys[k], keys[k], 1'b1, 1_000_000);
      end
      #(50_000_000ns);
      send_checked(8'hF0, 8'hF0, 1'b1, 100_000);   // break prefix: key still down
      send_checked(keys[k], keys[k], 1'b0, 20_000_000);
    end
    check(frames == 25, $sformatf("frames sent %0d", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
