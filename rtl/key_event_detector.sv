// key_event_detector: tells key presses from key releases.
//
// A keyboard sends a key's scan code when the key is pressed (and again
// about every 100 ms while it is held) and, when it is released, the break
// code F0 followed by the scan code. This block watches the error-free codes
// from the frame automaton: F0 arms a release flag; the next code is then a
// release, any other code a press. key_down (the extra LED) is 1 after a
// press and 0 after a release. Extended-key prefixes such as E0 are not
// treated apart: E0 counts as a press, and the release that follows
// (E0 F0 code) still ends with key_down = 0.
//
// Interface: clk, synchronous active-high rst, code, code_valid; out:
// key_down, key_event (one-cycle pulse per press or release), released
// (kind of the last event), key_code (scan code of the last event).
// Timing: outputs move the cycle after code_valid. Reset: no key down.
`timescale 1ns/1ps
module key_event_detector
  import ps2_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [DATA_BITS-1:0] code,
  input  logic                 code_valid,
  output logic                 key_down,
  output logic                 key_event,
  output logic                 released,
  output logic [DATA_BITS-1:0] key_code
);
  logic break_seen;

  always_ff @(posedge clk) begin
    if (rst) begin
      break_seen <= 1'b0;
      key_down   <= 1'b0;
      key_event  <= 1'b0;
      released   <= 1'b0;
      key_code   <= '0;
    end else begin
      key_event <= 1'b0;
      if (code_valid) begin
        if (code == BREAK_CODE) begin
          break_seen <= 1'b1;
        end else begin
          break_seen <= 1'b0;
          key_down   <= !break_seen;
          released   <= break_seen;
          key_code   <= code;
          key_event  <= 1'b1;
        end
      end
    end
  end
endmodule
