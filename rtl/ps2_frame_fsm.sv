// ps2_frame_fsm: the frame automaton of the improved PS/2 receiver.
//
// It follows one 11-bit frame on the 100 kHz samples of the PS/2 lines and
// updates its scan-code output only when the frame ended without a protocol
// error, so the LEDs and display driven from it never show a half-received
// byte. The states are the ones proposed for the exercise:
//   S0      idle; leave for S1 on a falling edge of the sampled data (start
//           bit). Error if the clock was not 1 when the data fell.
//   S1      wait for the first falling clock edge. Error if data is not 0
//           (start bit).
//   S2..S9  at each falling clock edge shift the data bit in (D0 first).
//   S10     at the falling clock edge store the data as the received parity
//           bit. Error if it is not the odd parity of D0..D7.
//   S11     at the falling clock edge check the stop bit (error if not 1);
//           if the frame had no error, load the scan code output; go to S0.
// Each error raises err for one cycle (the error counter adds one) and marks
// the frame as bad; a bad frame still runs to S11 so that the automaton
// stays aligned with the clock edges.
//
// Choices of this design, not given with the state list: the clock level
// checked in S0 is the one of the sample before the data edge; when the data
// and clock falls land in the same 10 us sample (the data may lead the clock
// by only 5 us) S0 takes both edges at once and goes straight to S2; the
// error LED output err_flag is set by any error and cleared by the next
// error-free frame; there is no time-out, so a frame that stops half way
// leaves the automaton waiting for further clock edges.
//
// Interface: clk, synchronous active-high rst, smp from ps2_sampler; out:
// code (last good scan code), code_valid (one-cycle pulse when code is
// loaded), parity (received parity bit), err (one-cycle pulse per error),
// err_flag (error LED), state (for observation). Timing: every output
// moves one cycle after the smp.valid carrying the deciding clock edge;
// code_valid follows the 11th falling clock edge of a frame.
`timescale 1ns/1ps
module ps2_frame_fsm
  import ps2_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  ps2_sample_t          smp,
  output logic [DATA_BITS-1:0] code,
  output logic                 code_valid,
  output logic                 parity,
  output logic                 err,
  output logic                 err_flag,
  output frame_state_t         state
);
  logic [DATA_BITS-1:0] shreg;
  logic                 frame_bad;
  logic                 clk_fall, data_fall;

  assign clk_fall  = smp.valid &&  smp.clk_prev  && !smp.clk;
  assign data_fall = smp.valid &&  smp.data_prev && !smp.data;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S0;
      shreg      <= '0;
      frame_bad  <= 1'b0;
      code       <= '0;
      code_valid <= 1'b0;
      parity     <= 1'b0;
      err        <= 1'b0;
      err_flag   <= 1'b0;
    end else begin
      code_valid <= 1'b0;
      err        <= 1'b0;
      unique case (state)
        S0: if (data_fall) begin
          // Start: the clock must still have been high when the data fell.
          frame_bad <= !smp.clk_prev;
          err       <= !smp.clk_prev;
          if (!smp.clk_prev) err_flag <= 1'b1;
          // Data and clock fell within one sample: that clock edge is the
          // start bit's (data is 0 by construction), so skip S1.
          state <= (smp.clk_prev && !smp.clk) ? S2 : S1;
        end
        S1: if (clk_fall) begin
          if (smp.data) begin
            frame_bad <= 1'b1;
            err       <= 1'b1;
            err_flag  <= 1'b1;
          end
          state <= S2;
        end
        S2, S3, S4, S5, S6, S7, S8, S9: if (clk_fall) begin
          shreg <= {smp.data, shreg[DATA_BITS-1:1]};
          state <= frame_state_t'(state + 4'd1);
        end
        S10: if (clk_fall) begin
          parity <= smp.data;
          if (smp.data != odd_parity(shreg)) begin
            frame_bad <= 1'b1;
            err       <= 1'b1;
            err_flag  <= 1'b1;
          end
          state <= S11;
        end
        S11: if (clk_fall) begin
          if (!smp.data) begin
            err      <= 1'b1;
            err_flag <= 1'b1;
          end else if (!frame_bad) begin
            code       <= shreg;
            code_valid <= 1'b1;
            err_flag   <= 1'b0;
          end
          frame_bad <= 1'b0;
          state     <= S0;
        end
        default: state <= S0;
      endcase
    end
  end

  // A frame is accepted only at the stop-bit edge.
  assert property (@(posedge clk) disable iff (rst)
                   code_valid |-> $past(state) == S11 && $past(clk_fall));
  // err and code_valid never come from the same edge.
  assert property (@(posedge clk) disable iff (rst) !(err && code_valid));
endmodule
