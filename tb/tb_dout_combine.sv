// tb_dout_combine: checks dout = 2^K * cnt + dec for K = 7 and K = 6, the
// one-cycle latency and valid pulse, and that dout holds between results.
// Includes the published example values n = 193, m = 8 -> 24712.
`timescale 1ns/1ps
module tb_dout_combine;
  logic        clk = 1'b0, rst_n = 1'b0, done = 1'b0, sel64 = 1'b0;
  logic [10:0] cnt = '0;
  logic [7:0]  dec = '0;
  logic [18:0] dout;
  logic        dout_valid;
  int          checks = 0, failures = 0;

  dout_combine dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [10:0] n, input logic [7:0] m, input logic s64);
    int exp;
    exp = s64 ? (int'(n) * 64 + int'(m)) : (int'(n) * 128 + int'(m));
    @(negedge clk); cnt = n; dec = m; sel64 = s64; done = 1'b1;
    @(negedge clk); done = 1'b0;
    checks++;
    if (!dout_valid || dout !== 19'(exp)) begin
      failures++;
      $display("FAIL n=%0d m=%0d sel64=%0d dout=%0d valid=%0d exp=%0d", n, m, s64, dout, dout_valid, exp);
    end
    cnt = 11'($urandom); dec = 8'($urandom);
    @(negedge clk);
    checks++;
    if (dout_valid || dout !== 19'(exp)) begin
      failures++;
      $display("FAIL hold: dout=%0d valid=%0d exp=%0d", dout, dout_valid, exp);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    apply(11'd193, 8'd8, 1'b0);
    apply(11'd192, 8'd81, 1'b0);
    apply(11'd191, 8'd55, 1'b0);
    apply(11'd2047, 8'd144, 1'b0);
    for (int i = 0; i < 200; i++)
      apply(11'($urandom), 8'($urandom_range(0, 144)), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
