// tb_seg7_display: checks the digit multiplexing of seg7_display: one
// low-active enable at a time, cycling through the four digits at the
// refresh rate, each showing the right nibble of the value (decoded here
// with an independent glyph table).
`timescale 1ns/1ps
module tb_seg7_display;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] value;
  logic [6:0]  seg;
  logic [3:0]  an;
  logic [1:0]  digit;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  // 1 kHz refresh at 20 kHz: a new digit every 20 cycles.
  seg7_display #(.CLK_HZ(20_000), .REFRESH_HZ(1_000), .ACTIVE_LOW(1'b1)) dut (
    .clk, .rst, .value, .seg, .an, .digit);

  // Active-high patterns {g..a} of 0..F.
  logic [6:0] glyph[16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                            7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos, last_change, changes;
    int seen[4];
    logic [3:0] prev_an;
    value = 16'h1234;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    prev_an = 4'hF;
    last_change = 0;
    changes = 0;
    for (int cyc = 1; cyc <= 1600; cyc++) begin
      if (cyc % 400 == 0) value = 16'($urandom);
      @(posedge clk);
      #1;
      if (cyc < 3) continue;
      check($countones(~an) == 1, $sformatf("one digit lit, an=%b", an));
      pos = 0;
      for (int i = 0; i < 4; i++) if (!an[i]) pos = i;
      seen[pos]++;
      check(~seg == glyph[value[4*pos +: 4]],
            $sformatf("digit %0d shows %b for %h", pos, ~seg, value[4*pos +: 4]));
      if (an != prev_an) begin
        if (changes > 1) check(cyc - last_change == 20, $sformatf("digit time %0d", cyc - last_change));
        if (prev_an != 4'hF)
          check(an == {prev_an[2:0], prev_an[3]}, "digits scan in order");
        changes++;
        last_change = cyc;
        prev_an = an;
      end
    end
    for (int i = 0; i < 4; i++) check(seen[i] > 300, $sformatf("digit %0d lit %0d cycles", i, seen[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
