// error_counter: counts protocol errors of the PS/2 receiver.
//
// An 8-bit counter that goes up by one on every cycle inc is high. It wraps
// from 255 to 0; wrapping, rather than stopping at 255, is this design's
// choice. The frame automaton raises inc for one cycle per error it finds.
//
// Interface: clk, synchronous active-high rst (clears the count), inc;
// out: count. Timing: count changes the cycle after inc.
`timescale 1ns/1ps
module error_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             inc,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk) begin
    if (rst)
      count <= '0;
    else if (inc)
      count <= count + 1'b1;
  end
endmodule
