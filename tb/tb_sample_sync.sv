// tb_sample_sync: raises stop at random times relative to clk with a known
// counter value, then checks that exactly one start pulse follows, that it
// arrives SYNC + 1 = 3 cycles after the first clk edge that sees stop high,
// and that cnt_q holds the counter value.
`timescale 1ns/1ps
module tb_sample_sync;
  logic        clk = 1'b0, rst_n = 1'b0, stop = 1'b0;
  logic [10:0] cnt_osc = '0, cnt_q;
  logic        start;
  int          checks = 0, failures = 0;

  sample_sync dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int starts, first_edge, cyc, start_cyc;
    logic [10:0] v;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      v = 11'($urandom);
      cnt_osc = v;
      #(0.1 + real'($urandom_range(0, 480)) / 100.0);
      stop = 1'b1;
      starts = 0; cyc = 0; start_cyc = -1;
      repeat (10) begin
        @(posedge clk); cyc++;
        #0.1;
        if (start) begin starts++; start_cyc = cyc; end
      end
      checks++;
      if (starts != 1 || start_cyc != 3) begin
        failures++;
        $display("FAIL start pulses=%0d at cycle %0d, expected 1 at cycle 3", starts, start_cyc);
      end
      cnt_osc = ~v;
      checks++;
      if (cnt_q !== v) begin
        failures++;
        $display("FAIL cnt_q=%0d expected %0d", cnt_q, v);
      end
      stop = 1'b0;
      repeat (5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
