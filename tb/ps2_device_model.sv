// ps2_device_model: behavioural model of a PS/2 keyboard's transmitter.
//
// Drives the PS/2 clock and data lines (idle high) and sends frames of
// 11 bits: start 0, D0..D7, odd parity, stop 1. For each bit the data line
// is set, the clock falls tsu_ns later, stays low for half a period and
// rises, and the next bit follows half a period after that, so the data
// changes (T_CK/2 - T_SU) after a rising edge. T_CK may be 30..50 us and
// T_SU 5..25 us. Tasks can damage a frame in the four ways a receiver
// must detect. Not synthesizable; testbench use only.
`timescale 1ns/1ps
module ps2_device_model (
  output logic ps2_clk,
  output logic ps2_data
);
  int unsigned half_ns = 20_000;  // half of T_CK
  int unsigned tsu_ns  = 10_000;  // T_SU

  initial begin
    ps2_clk  = 1'b1;
    ps2_data = 1'b1;
  end

  function automatic logic odd_par(input logic [7:0] d);
    return ~(^d);
  endfunction

  task automatic clock_bit(input logic b);
    ps2_data = b;
    #(tsu_ns * 1ns);
    ps2_clk = 1'b0;
    #(half_ns * 1ns);
    ps2_clk = 1'b1;
    #((half_ns - tsu_ns) * 1ns);
  endtask

  // kind: 0 good frame, 1 parity wrong, 2 stop bit 0, 3 start bit 1 at the
  // first clock edge (data pulses low first), 4 clock low when data falls.
  task automatic send(input logic [7:0] code, input int kind = 0,
                      input int unsigned gap_ns = 100_000);
    logic [10:0] bits;
    bits = {(kind == 2) ? 1'b0 : 1'b1,
            (kind == 1) ? ~odd_par(code) : odd_par(code),
            code, 1'b0};
    if (kind == 3) begin
      ps2_data = 1'b0;
      #(25_000ns);
      ps2_data = 1'b1;
      #(25_000ns);
      bits[0] = 1'b1;
    end
    if (kind == 4) begin
      ps2_clk = 1'b0;
      #(30_000ns);
      ps2_data = 1'b0;
      #(30_000ns);
      ps2_clk = 1'b1;
      #(30_000ns);
    end
    for (int i = 0; i < 11; i++) clock_bit(bits[i]);
    ps2_data = 1'b1;
    #(gap_ns * 1ns);
  endtask
endmodule
