// ps2_pkg: types and constants shared by the PS/2 keyboard receiver.
//
// A PS/2 frame is 11 bits sent LSB first on one data wire, each bit valid at
// a falling edge of the device-driven clock: a start bit (0), eight data
// bits, an odd parity bit and a stop bit (1). Releasing a key sends the
// break code F0 followed by the key's scan code. These numbers come from the
// protocol description; the sample record and the state encoding are this
// design's own.
`timescale 1ns/1ps
package ps2_pkg;

  localparam int unsigned FRAME_BITS = 11;
  localparam int unsigned DATA_BITS  = 8;
  localparam logic [7:0]  BREAK_CODE = 8'hF0;

  // One 100 kHz sample of the two PS/2 lines, as the sampler hands it on.
  // valid is high for one system clock cycle when a new sample is taken;
  // the other fields hold their values between samples.
  typedef struct packed {
    logic valid;      // new sample this cycle
    logic clk;        // sampled PS/2 clock
    logic data;       // sampled PS/2 data
    logic clk_prev;   // PS/2 clock at the sample before
    logic data_prev;  // PS/2 data at the sample before
  } ps2_sample_t;

  // States of the frame automaton: S0 idle, S1 start bit, S2..S9 data bits
  // D0..D7, S10 parity bit, S11 stop bit.
  typedef enum logic [3:0] {
    S0  = 4'd0,  S1  = 4'd1,  S2  = 4'd2,  S3  = 4'd3,
    S4  = 4'd4,  S5  = 4'd5,  S6  = 4'd6,  S7  = 4'd7,
    S8  = 4'd8,  S9  = 4'd9,  S10 = 4'd10, S11 = 4'd11
  } frame_state_t;

  // Odd parity bit for a data byte: the data bits and the parity bit
  // together hold an odd number of ones.
  function automatic logic odd_parity(input logic [7:0] d);
    return ~(^d);
  endfunction

endpackage
