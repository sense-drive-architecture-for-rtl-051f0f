// tb_tdl_decoder: self-checking test of the delay-line decoder.
//
// Builds delay-line words from an ideal model of the oscillator seen
// through the line: with the last rising edge e + 0.5 cells ago, a period
// of P cells and a high time of H cells, bit i holds osc((e + 0.5 - i) mod P
// < H). The expected result is e + 1. P is varied around M (delay offset),
// one bubble may be flipped away from the true transition (not in the first
// 8 taps, where the mask is cut off by the line start), bits beyond the
// active length are random, and both 128- and 64-cell modes are used. Also
// checks that done comes exactly 3 clk cycles after start.
`timescale 1ns/1ps
module tb_tdl_decoder;
  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0, size = 1'b0;
  logic [143:0] tdl = '0;
  logic         done;
  logic [7:0]   out;
  int           checks = 0, failures = 0;

  tdl_decoder dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [143:0] make_word(int e, int p, int h, int len);
    logic [143:0] w;
    int ph2;  // phase in half-cells, to place the edge between cells
    for (int i = 0; i < 144; i++) begin
      if (i < len) begin
        ph2 = (2 * e + 1 - 2 * i) % (2 * p);
        if (ph2 < 0) ph2 += 2 * p;
        w[i] = (ph2 < 2 * h);
      end else
        w[i] = 1'($urandom);
    end
    return w;
  endfunction

  task automatic run(input logic [143:0] w, input logic s64, input int exp, input string what);
    int lat;
    @(negedge clk); tdl = w; size = s64; start = 1'b1;
    @(negedge clk); start = 1'b0; tdl = {5{$urandom}};
    lat = 1;
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 3) begin
      failures++;
      $display("FAIL %s: done after %0d cycles, expected 3", what, lat);
    end
    checks++;
    if (int'(out) != exp) begin
      failures++;
      $display("FAIL %s: out=%0d expected %0d (word %h)", what, out, exp, w);
    end
  endtask

  initial begin
    int m, p, h, e, len, b, mode;
    logic [143:0] w;
    #12 rst_n = 1'b1;
    // published example: osc already low, ones end at m-1, zeros from m
    run(make_word(56, 128, 64, 144), 1'b0, 57, "example");
    for (int t = 0; t < 600; t++) begin
      mode = t % 2;
      m    = mode ? 64 : 128;
      len  = mode ? 72 : 144;
      p    = m + int'($urandom_range(0, 12)) - 6;
      h    = p / 2 + int'($urandom_range(0, 6)) - 3;
      e    = int'($urandom_range(0, p - 1));
      w    = make_word(e, p, h, len);
      if (t % 3 == 0) begin
        b = int'($urandom_range(0, len - 1));
        if (b >= 8 && (b < e - 1 || b > e + 2)) w[b] = ~w[b];
      end
      run(w, 1'(mode), e + 1, "random");
    end
    // no transition at all: stopped oscillator
    run('0, 1'b0, 0, "all zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
