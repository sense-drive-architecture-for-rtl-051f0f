// tb_tdc: end-to-end test of the coarse-fine TDC with an ideal oscillator
// from the testbench. Each measurement releases rst, keeps stop low for a
// random sensing time, then raises stop. Checks per measurement:
//   - cnt equals the number of osc rising edges the testbench saw between
//     the release of rst and the rise of stop
//   - dec equals ceil((t_stop - t_last_rise) / (T / M)) within 1 cell
//   - done arrives SYNC + 4 = 6 clk cycles after the first clk edge that
//     sees stop high
// Runs in 128-cell and 64-cell mode (calibration voltage 0.8 V and 0.5 V)
// and at two oscillator frequencies.
`timescale 1ns/1ps
module tb_tdc;
  logic        clk = 1'b0, rst_n = 1'b0, osc = 1'b0, rst = 1'b1, stop = 1'b1, sel64 = 1'b0;
  logic        done;
  logic [7:0]  dec;
  logic [10:0] cnt;
  real         tau_ns, err_ns, vctrl;
  real         vcal = 0.8;
  real         period = 25.74, t_rise = 0.0;
  int          edges = 0;
  int          checks = 0, failures = 0;

  tdc dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #3.3;
    forever begin
      osc = 1'b1;
      #(period / 2.0);
      osc = 1'b0;
      #(period / 2.0);
    end
  end
  always @(posedge osc) begin
    t_rise = $realtime;
    if (!rst && !stop) edges++;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int tsns_ns);
    real ts, mexp;
    int  m, lat;
    @(negedge clk); rst = 1'b0; stop = 1'b0; edges = 0;
    #(real'(tsns_ns) + real'($urandom_range(0, 500)) / 100.0);
    ts = $realtime;
    stop = 1'b1;
    mexp = (ts - t_rise) / (period / (sel64 ? 64.0 : 128.0));
    m = int'($ceil(mexp));
    @(posedge clk);
    lat = 1;
    #0.1;
    while (!done && lat < 40) begin @(posedge clk); lat++; #0.1; end
    checks++;
    if (lat != 6) begin failures++; $display("FAIL done after %0d clk edges", lat); end
    checks++;
    if (int'(cnt) != edges) begin failures++; $display("FAIL cnt=%0d expected %0d", cnt, edges); end
    checks++;
    if (int'(dec) < m - 1 || int'(dec) > m + 1) begin
      failures++;
      $display("FAIL dec=%0d expected %0d (%f)", dec, m, mexp);
    end
    repeat (20) @(negedge clk);
    rst = 1'b1;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    #12 rst_n = 1'b1;
    #(400 * 25.74);   // let the DLL lock
    for (int i = 0; i < 20; i++) measure(1000 + int'($urandom_range(0, 4000)));
    sel64 = 1'b1;
    vcal  = 0.5;
    #(400 * 25.74);
    for (int i = 0; i < 10; i++) measure(1000 + int'($urandom_range(0, 4000)));
    sel64 = 1'b0;
    vcal  = 0.8;
    period = 26.34;
    #(400 * 26.34);
    for (int i = 0; i < 10; i++) measure(5000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
