// ps2_keyboard_top: PS/2 keyboard receiver for an FPGA board.
//
// The keyboard's clock and data lines are sampled at SAMPLE_HZ (100 kHz)
// by one sampler that feeds two receivers side by side:
//   - the simple receiver, an 11-bit shift register whose data bits drive
//     led_raw directly (they flicker while a frame arrives);
//   - the improved receiver, a frame automaton that checks start, parity
//     and stop bits and updates led_code only after an error-free frame.
//     Its errors go to an 8-bit error counter and to led_error; a press /
//     release detector drives led_key; a four-digit seven-segment display
//     shows the scan code (left two digits) and the error count (right two).
// The two PS/2 lines are also brought out unchanged on la_clk and la_data
// for a logic analyzer.
//
// Board clock frequency (CLK_HZ, 50 MHz), the synchronous active-high reset
// button, the display refresh rate and polarity are this design's choices;
// the 100 kHz sampling, the frame format, the automaton and the 8-bit error
// counter follow the exercise.
//
// Timing: a frame lasts 11 PS/2 clock periods (330..550 us); led_code,
// led_key and the display change within a few system clock cycles of the
// first 100 kHz sample after the frame's 11th falling clock edge.
`timescale 1ns/1ps
module ps2_keyboard_top
  import ps2_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned SAMPLE_HZ  = 100_000,
  parameter int unsigned REFRESH_HZ = 1_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic [7:0] led_raw,
  output logic [7:0] led_code,
  output logic       led_error,
  output logic       led_key,
  output logic [6:0] seg,
  output logic [3:0] an,
  output logic       la_clk,
  output logic       la_data
);
  logic                  sample_tick;
  ps2_sample_t           smp;
  logic [FRAME_BITS-1:0] raw_shreg;
  logic [7:0]            code;
  logic                  code_valid;
  logic                  parity;
  logic                  err;
  frame_state_t          state;
  logic [7:0]            err_count;
  logic                  key_event, released;
  logic [7:0]            key_code;
  logic [1:0]            digit;

  assign la_clk  = ps2_clk;
  assign la_data = ps2_data;

  tick_gen #(.CLK_HZ(CLK_HZ), .TICK_HZ(SAMPLE_HZ)) u_sample_tick (
    .clk (clk),
    .rst (rst),
    .tick(sample_tick)
  );

  ps2_sampler u_sampler (
    .clk        (clk),
    .rst        (rst),
    .tick       (sample_tick),
    .ps2_clk_in (ps2_clk),
    .ps2_data_in(ps2_data),
    .smp        (smp)
  );

  ps2_shift_receiver u_simple (
    .clk  (clk),
    .rst  (rst),
    .smp  (smp),
    .leds (led_raw),
    .shreg(raw_shreg)
  );

  ps2_frame_fsm u_fsm (
    .clk       (clk),
    .rst       (rst),
    .smp       (smp),
    .code      (code),
    .code_valid(code_valid),
    .parity    (parity),
    .err       (err),
    .err_flag  (led_error),
    .state     (state)
  );

  assign led_code = code;

  error_counter #(.WIDTH(8)) u_errors (
    .clk  (clk),
    .rst  (rst),
    .inc  (err),
    .count(err_count)
  );

  key_event_detector u_keys (
    .clk       (clk),
    .rst       (rst),
    .code      (code),
    .code_valid(code_valid),
    .key_down  (led_key),
    .key_event (key_event),
    .released  (released),
    .key_code  (key_code)
  );

  seg7_display #(.CLK_HZ(CLK_HZ), .REFRESH_HZ(REFRESH_HZ), .ACTIVE_LOW(1'b1)) u_display (
    .clk  (clk),
    .rst  (rst),
    .value({code, err_count}),
    .seg  (seg),
    .an   (an),
    .digit(digit)
  );
endmodule
