// tb_key_event_detector: sends scan-code sequences (presses, repeats,
// F0 releases) to the detector and checks key_down, the event pulse, its
// kind and code against a reference built from the sequence.
`timescale 1ns/1ps
module tb_key_event_detector;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] code = '0, key_code;
  logic code_valid = 1'b0, key_down, key_event, released;
  int checks = 0, failures = 0, n_press = 0, n_release = 0;

  always #10 clk = ~clk;

  key_event_detector dut (.clk, .rst, .code, .code_valid, .key_down, .key_event, .released, .key_code);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic send(input logic [7:0] c, input bit exp_event, input bit exp_rel);
    code <= c;
    code_valid <= 1'b1;
    @(posedge clk);
    code_valid <= 1'b0;
    #1;
    check(key_event == exp_event, $sformatf("event for %h", c));
    if (exp_event) begin
      check(released == exp_rel && key_down == !exp_rel && key_code == c,
            $sformatf("code %h: rel %b down %b kc %h", c, released, key_down, key_code));
      if (exp_rel) n_release++; else n_press++;
    end
    @(posedge clk);
    #1;
    check(!key_event, "event pulse one cycle");
    repeat ($urandom % 4) @(posedge clk);
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] k;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);
    #1;
    check(!key_down, "no key down after reset");
    for (int n = 0; n < 100; n++) begin
      do k = 8'($urandom); while (k == 8'hF0);
      send(k, 1, 0);                                  // press
      repeat ($urandom % 3) send(k, 1, 0);            // typematic repeat
      send(8'hF0, 0, 0);                              // break prefix
      check(key_down, "break prefix alone changes nothing");
      send(k, 1, 1);                                  // release
    end
    check(n_press > 0 && n_release > 0, "press and release seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
