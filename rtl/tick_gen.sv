// tick_gen: clock-enable generator.
//
// Divides the system clock by DIV = CLK_HZ / TICK_HZ and raises tick for one
// system clock cycle every DIV cycles. The receiver uses it to sample the
// PS/2 lines at 100 kHz and the display uses it for its digit refresh; all
// logic stays on the one system clock.
//
// Interface: clk, synchronous active-high rst, tick out. Timing: the first
// tick comes DIV cycles after reset is released, then one every DIV cycles.
// DIV is rounded down; TICK_HZ above CLK_HZ gives a tick every cycle.
`timescale 1ns/1ps
module tick_gen #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned TICK_HZ = 100_000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned DIV_RAW = CLK_HZ / TICK_HZ;
  localparam int unsigned DIV     = (DIV_RAW < 1) ? 1 : DIV_RAW;
  localparam int unsigned CW      = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count == CW'(DIV - 1)) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      tick  <= 1'b0;
    end
  end
endmodule
