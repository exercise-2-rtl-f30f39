// ps2_shift_receiver: the simple PS/2 receiver that the improved automaton
// replaces.
//
// An 11-bit shift register takes the sampled data bit at every falling edge
// of the sampled PS/2 clock, shifting towards bit 0 so that after a whole
// frame it holds {stop, parity, D7..D0, start}. The eight data positions
// drive the LEDs directly, so the LEDs show the last scan code once a frame
// is complete but flicker while the next frame shifts through, and a break
// code F0 is overwritten by the following scan code before it can be seen.
// It has no framing or error check. Shifting at the falling edge (where
// PS/2 data is valid) and the bit order are this design's reading.
//
// Interface: clk, synchronous active-high rst, smp from ps2_sampler; out:
// leds (data bits), shreg (whole register). Timing: the register moves one
// cycle after the smp.valid that shows the falling edge. Reset clears it.
`timescale 1ns/1ps
module ps2_shift_receiver
  import ps2_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  ps2_sample_t           smp,
  output logic [DATA_BITS-1:0]  leds,
  output logic [FRAME_BITS-1:0] shreg
);
  always_ff @(posedge clk) begin
    if (rst)
      shreg <= '0;
    else if (smp.valid && smp.clk_prev && !smp.clk)
      shreg <= {smp.data, shreg[FRAME_BITS-1:1]};
  end

  assign leds = shreg[DATA_BITS:1];
endmodule
