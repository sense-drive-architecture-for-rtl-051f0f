// tb_osc_counter: self-checking test of the coarse oscillator counter.
//
// Drives osc as a free clock, releases rst, lets a random number of rising
// edges through while stop is low, then raises stop between edges and
// checks that the count equals the number of edges seen with stop low and
// stays frozen on later edges. Also checks asynchronous clear and the
// 11-bit wrap-around.
`timescale 1ns/1ps
module tb_osc_counter;
  logic        osc = 1'b0, rst = 1'b0, stop = 1'b1;
  logic [10:0] cnt;
  int          checks = 0, failures = 0;

  osc_counter dut (.osc(osc), .rst(rst), .stop(stop), .cnt(cnt));

  task automatic check(input logic [10:0] exp, input string what);
    checks++;
    if (cnt !== exp) begin
      failures++;
      $display("FAIL %s: cnt=%0d expected %0d", what, cnt, exp);
    end
  endtask

  task automatic pulses(input int n);
    repeat (n) begin
      #6.4 osc = 1'b1;
      #6.4 osc = 1'b0;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    #1 rst = 1'b1;
    #2;
    check(11'd0, "cleared by rst");
    for (int trial = 0; trial < 20; trial++) begin
      n = 1 + int'($urandom_range(0, 400));
      rst = 1'b1; #3; rst = 1'b0; #1; stop = 1'b0;
      pulses(n);
      #2 stop = 1'b1;
      check(11'(n), "count during sensing");
      pulses(5);
      check(11'(n), "frozen after stop");
      rst = 1'b1; #1;
      check(11'd0, "async clear");
    end
    // wrap-around of the 11-bit counter
    rst = 1'b0; stop = 1'b0;
    pulses(2048 + 3);
    stop = 1'b1;
    check(11'd3, "wrap at 2^11");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
