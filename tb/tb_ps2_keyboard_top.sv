// tb_ps2_keyboard_top: end-to-end test of the PS/2 keyboard receiver at its
// default parameters (50 MHz board clock, 100 kHz sampling, 1 kHz display
// refresh). A PS/2 device model types keys (press, typematic repeat, F0
// release) and sends damaged frames of each error kind, with T_CK and T_SU
// spread over their allowed ranges. After every frame the test checks the
// latched LEDs, the raw shift-register LEDs, the error LED, the key LED and
// the error count; at intervals it reads all four display digits back and
// decodes them. It counts each mechanism of the design and fails if one
// never happened: good-frame update, the four error kinds, press, release,
// raw-LED flicker while a frame arrives, the one-sample start (data and
// clock falling in the same sample), and display read-back.
`timescale 1ns/1ps
module tb_ps2_keyboard_top;
  import ps2_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic ps2_clk, ps2_data;
  logic [7:0] led_raw, led_code;
  logic led_error, led_key;
  logic [6:0] seg;
  logic [3:0] an;
  logic la_clk, la_data;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_update = 0, n_press = 0, n_release = 0, n_flicker = 0, n_fast_start = 0, n_display = 0;
  int n_kind[5];

  always #10 clk = ~clk;   // 50 MHz

  ps2_device_model dev (.ps2_clk, .ps2_data);

  ps2_keyboard_top dut (
    .clk, .rst, .ps2_clk, .ps2_data, .led_raw, .led_code, .led_error, .led_key,
    .seg, .an, .la_clk, .la_data);

  // Active-high glyphs {g..a} of 0..F, for reading the display back.
  logic [6:0] glyph[16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                            7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Observation: the automaton taking the start bit's clock edge in S0.
  always @(posedge clk)
    if (dut.u_fsm.state == S0 && dut.u_fsm.smp.valid && !dut.u_fsm.smp.data &&
        dut.u_fsm.smp.data_prev && dut.u_fsm.smp.clk_prev && !dut.u_fsm.smp.clk)
      n_fast_start++;

  // Raw LEDs moving while the latched LEDs hold still, during a frame.
  logic [7:0] raw_prev;
  logic       in_frame = 1'b0;
  always @(posedge clk) begin
    raw_prev <= led_raw;
    if (in_frame && led_raw != raw_prev) n_flicker++;
  end

  // The logic-analyzer pins follow the PS/2 lines.
  always @(negedge clk)
    if (!rst) begin
      checks++;
      if (la_clk != ps2_clk || la_data != ps2_data) failures++;
    end

  // Read the four digits back over one full scan; return {d3,d2,d1,d0}.
  task automatic read_display(output logic [15:0] v, output bit ok);
    bit got[4];
    ok = 1'b1;
    v = '0;
    for (int n = 0; n < 5 * 50_000; n++) begin
      @(posedge clk);
      for (int i = 0; i < 4; i++)
        if (!an[i]) begin
          int d = -1;
          for (int g = 0; g < 16; g++) if (~seg == glyph[g]) d = g;
          if (d < 0) ok = 1'b0;
          else begin
            v[4*i +: 4] = 4'(d);
            got[i] = 1'b1;
          end
        end
    end
    for (int i = 0; i < 4; i++) if (!got[i]) ok = 1'b0;
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One frame from the device, then the checks on what it should change.
  task automatic frame(input logic [7:0] c, input int kind,
                       inout logic [7:0] exp_code, inout int exp_err,
                       inout bit brk, inout bit exp_key);
    int err0;
    err0 = exp_err;
    dev.half_ns = 15_000 + ($urandom % 10_001);
    dev.tsu_ns  = 5_000 + ($urandom % 10_001);
    in_frame = 1'b1;
    dev.send(c, kind, 60_000);
    in_frame = 1'b0;
    n_kind[kind]++;
    if (kind == 0) begin
      exp_code = c;
      n_update++;
      if (c == BREAK_CODE) brk = 1'b1;
      else begin
        if (brk) n_release++; else n_press++;
        exp_key = !brk;
        brk = 1'b0;
      end
      check(led_raw == c, $sformatf("raw LEDs %h exp %h", led_raw, c));
      check(!led_error, "error LED off after a good frame");
    end else begin
      exp_err++;
      check(led_error, $sformatf("error LED on after error kind %0d", kind));
    end
    check(led_code == exp_code, $sformatf("latched LEDs %h exp %h", led_code, exp_code));
    check(led_key == exp_key, $sformatf("key LED %b exp %b", led_key, exp_key));
    check(dut.err_count == 8'(exp_err), $sformatf("error count %0d exp %0d", dut.err_count, exp_err));
  endtask

  initial begin
    logic [7:0] exp_code, k;
    logic [15:0] shown;
    bit ok, brk, exp_key;
    int exp_err;
    exp_code = '0; exp_err = 0; brk = 1'b0; exp_key = 1'b0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (10) @(posedge clk);
    check(led_code == 8'h00 && !led_error && !led_key, "reset state");

    // Typing: press, repeats, release, for a few keys.
    for (int n = 0; n < 6; n++) begin
      do k = 8'($urandom); while (k == 8'hF0);
      frame(k, 0, exp_code, exp_err, brk, exp_key);
      repeat ($urandom % 3) frame(k, 0, exp_code, exp_err, brk, exp_key);
      frame(8'hF0, 0, exp_code, exp_err, brk, exp_key);
      frame(k, 0, exp_code, exp_err, brk, exp_key);
      if (n == 2) begin
        read_display(shown, ok);
        n_display++;
        check(ok && shown == {exp_code, 8'(exp_err)}, $sformatf("display %h exp %h", shown, {exp_code, 8'(exp_err)}));
      end
    end
    // Damaged frames of every kind, between good ones.
    for (int kind = 1; kind <= 4; kind++) begin
      frame(8'($urandom), kind, exp_code, exp_err, brk, exp_key);
      frame(8'($urandom), kind, exp_code, exp_err, brk, exp_key);
      do k = 8'($urandom); while (k == 8'hF0);
      frame(k, 0, exp_code, exp_err, brk, exp_key);
    end
    frame(8'h3C, 3, exp_code, exp_err, brk, exp_key);
    read_display(shown, ok);
    n_display++;
    check(ok && shown == {exp_code, 8'(exp_err)}, $sformatf("display %h exp %h", shown, {exp_code, 8'(exp_err)}));
    // Extra frames at the shortest set-up time, to see the one-sample start.
    for (int n = 0; n < 10 && n_fast_start == 0; n++) begin
      dev.tsu_ns = 5_000;
      do k = 8'($urandom); while (k == 8'hF0);
      in_frame = 1'b1;
      dev.send(k, 0, 60_000);
      in_frame = 1'b0;
      exp_code = k; exp_key = 1'b1; brk = 1'b0; n_update++; n_press++;
      check(led_code == k, "one-sample start frame received");
    end

    check(n_update > 0,     "mechanism: good-frame update");
    for (int i = 1; i <= 4; i++) check(n_kind[i] > 0, $sformatf("mechanism: error kind %0d", i));
    check(n_press > 0,      "mechanism: key press");
    check(n_release > 0,    "mechanism: key release");
    check(n_flicker > 0,    "mechanism: raw LED flicker");
    check(n_fast_start > 0, "mechanism: one-sample start");
    check(n_display > 0,    "mechanism: display read-back");
    $display("updates %0d press %0d release %0d errors start-clk %0d start-bit %0d parity %0d stop %0d",
             n_update, n_press, n_release, n_kind[4], n_kind[3], n_kind[1], n_kind[2]);
    $display("raw flicker %0d one-sample starts %0d display reads %0d", n_flicker, n_fast_start, n_display);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
