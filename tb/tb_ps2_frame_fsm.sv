// tb_ps2_frame_fsm: drives the frame automaton through tick_gen and
// ps2_sampler from the PS/2 device model (1 MHz system clock, 100 kHz
// sampling) and checks it against what each frame should produce:
// good frames load the code at the stop-bit edge, each of the four
// protocol errors gives exactly one err pulse and leaves the code alone,
// the error flag follows, and the received parity bit is output. Timing is
// swept over T_CK 30..50 us and T_SU 5..25 us. The latency from the 11th
// falling PS/2 clock edge to code_valid must be at most two sample
// periods plus a few cycles.
`timescale 1ns/1ps
module tb_ps2_frame_fsm;
  import ps2_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic tick;
  logic ps2_clk, ps2_data;
  ps2_sample_t smp;
  logic [7:0] code;
  logic code_valid, parity, err, err_flag;
  frame_state_t state;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  int kind_seen[5];
  realtime last_fall, valid_time;

  always #500 clk = ~clk;   // 1 MHz

  ps2_device_model dev (.ps2_clk, .ps2_data);
  tick_gen #(.CLK_HZ(1_000_000), .TICK_HZ(100_000)) u_tick (.clk, .rst, .tick);
  ps2_sampler u_smp (.clk, .rst, .tick, .ps2_clk_in(ps2_clk), .ps2_data_in(ps2_data), .smp);
  ps2_frame_fsm dut (.clk, .rst, .smp, .code, .code_valid, .parity, .err, .err_flag, .state);

  always @(negedge ps2_clk) last_fall = $realtime;
  always @(posedge clk) begin
    if (code_valid) begin
      n_valid++;
      valid_time = $realtime;
    end
    if (err) n_err++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] c, exp_code;
    int kind, v0, e0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    exp_code = 8'h00;
    for (int f = 0; f < 150; f++) begin
      dev.half_ns = 15_000 + ($urandom % 10_001);
      dev.tsu_ns  = 5_000 + ($urandom % (dev.half_ns - 5_000 + 1));
      if (dev.tsu_ns > 25_000) dev.tsu_ns = 25_000;
      c    = 8'($urandom);
      kind = (f < 10) ? 0 : (f < 15) ? f - 10 : (($urandom % 3) == 0 ? 1 + $urandom % 4 : 0);
      v0 = n_valid; e0 = n_err;
      dev.send(c, kind);
      kind_seen[kind]++;
      if (kind == 0) begin
        exp_code = c;
        check(n_valid == v0 + 1 && n_err == e0,
              $sformatf("frame %0d good %h: valid %0d err %0d", f, c, n_valid - v0, n_err - e0));
        check(code == c, $sformatf("frame %0d code %h exp %h", f, code, c));
        check(parity == odd_parity(c), "received parity bit output");
        check(!err_flag, "error flag clear after a good frame");
        check(valid_time - last_fall <= 2 * 10_000 + 5_000,
              $sformatf("latency %0t", valid_time - last_fall));
      end else begin
        check(n_valid == v0 && n_err == e0 + 1,
              $sformatf("frame %0d kind %0d: valid %0d err %0d", f, kind, n_valid - v0, n_err - e0));
        check(code == exp_code, "code kept after a bad frame");
        check(err_flag, "error flag set after a bad frame");
      end
      check(state == S0, "back in S0 after the frame");
    end
    for (int k = 0; k < 5; k++) check(kind_seen[k] > 0, $sformatf("frame kind %0d exercised", k));
    $display("good %0d parity %0d stop %0d start %0d clk %0d",
             kind_seen[0], kind_seen[1], kind_seen[2], kind_seen[3], kind_seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
