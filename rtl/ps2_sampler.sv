// ps2_sampler: samples the PS/2 clock and data lines at the tick rate.
//
// The two lines come from the keyboard asynchronously, so each first passes
// a two-flip-flop synchronizer on the system clock. On every tick (100 kHz
// in the receiver) the synchronized levels are stored as the current sample
// and the former sample is kept beside it, so the receivers see edges of
// the sampled lines as (prev, now) = (1, 0). Sampling at 100 kHz, i.e.
// every 10 us, is what the receiver is specified with; the synchronizer is
// this design's addition.
//
// Interface: clk, synchronous active-high rst, tick, ps2_clk_in,
// ps2_data_in; out: smp (ps2_pkg::ps2_sample_t). Timing: smp.valid pulses
// the cycle after tick, when the new sample appears. Reset loads the idle
// level 1 into every sample.
`timescale 1ns/1ps
module ps2_sampler
  import ps2_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic        ps2_clk_in,
  input  logic        ps2_data_in,
  output ps2_sample_t smp
);
  logic [1:0] clk_sync, data_sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync  <= 2'b11;
      data_sync <= 2'b11;
    end else begin
      clk_sync  <= {clk_sync[0], ps2_clk_in};
      data_sync <= {data_sync[0], ps2_data_in};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      smp <= '{valid: 1'b0, clk: 1'b1, data: 1'b1, clk_prev: 1'b1, data_prev: 1'b1};
    end else begin
      smp.valid <= tick;
      if (tick) begin
        smp.clk       <= clk_sync[1];
        smp.data      <= data_sync[1];
        smp.clk_prev  <= smp.clk;
        smp.data_prev <= smp.data;
      end
    end
  end
endmodule
