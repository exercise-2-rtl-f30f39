// seg7_display: multiplexed four-digit seven-segment display driver.
//
// Shows a 16-bit value as four hexadecimal digits; in the receiver the two
// left digits are the scan code and the two right digits the error counter.
// Only one digit is lit at a time: a refresh tick of REFRESH_HZ moves to the
// next digit, so each digit is lit REFRESH_HZ/4 times a second, fast enough
// to look steady. The exercise only asks for the scan code and the counter
// on the display; the multiplexing, the rate and the polarity (ACTIVE_LOW
// for common-anode boards with low-active digit enables) are this design's.
//
// Interface: clk, synchronous active-high rst, value; out: seg
// ({g,f,e,d,c,b,a}), an (digit enables, an[3] is the leftmost digit),
// digit (index of the lit digit). Timing: seg and an are registered and
// change together one cycle after a refresh tick. Reset lights digit 0.
`timescale 1ns/1ps
module seg7_display #(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned REFRESH_HZ = 1_000,
  parameter bit          ACTIVE_LOW = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] value,
  output logic [6:0]  seg,
  output logic [3:0]  an,
  output logic [1:0]  digit
);
  logic       refresh;
  logic [3:0] nibble;
  logic [6:0] seg_on;

  tick_gen #(.CLK_HZ(CLK_HZ), .TICK_HZ(REFRESH_HZ)) u_refresh (
    .clk (clk),
    .rst (rst),
    .tick(refresh)
  );

  always_ff @(posedge clk) begin
    if (rst)
      digit <= 2'd0;
    else if (refresh)
      digit <= digit + 2'd1;
  end

  assign nibble = value[4*digit +: 4];

  hex_to_7seg u_dec (
    .hex(nibble),
    .seg(seg_on)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      seg <= ACTIVE_LOW ? 7'h7F : 7'h00;
      an  <= ACTIVE_LOW ? 4'hF  : 4'h0;
    end else begin
      seg <= ACTIVE_LOW ? ~seg_on : seg_on;
      an  <= ACTIVE_LOW ? ~(4'b0001 << digit) : (4'b0001 << digit);
    end
  end
endmodule
