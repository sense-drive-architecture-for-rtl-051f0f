// tb_tdl_dll: checks the delay-line / DLL model with an ideal 50 % duty
// oscillator from the testbench.
//   - lock: after 300 periods, M * tau equals the period (M = 128, then 64)
//   - tracking: the loop relocks after a frequency step
//   - snapshot: at the stop edge every latch k holds osc(t_stop - k*tau),
//     checked against the testbench's own edge times
//   - control voltage: at lock vctrl is where the delay law, inverted by
//     the testbench, puts it
//   - calibration: a vcal too high for the period pins vctrl at the bottom
//     of its range and tau at its largest value for that vcal
//   - locking range: a period beyond 128 * 0.48 ns leaves tau at its limit
`timescale 1ns/1ps
module tb_tdl_dll;
  logic         osc = 1'b0, stop = 1'b0, sel64 = 1'b0;
  logic [143:0] q;
  real          tau_ns, err_ns, vctrl;
  real          vcal = 0.8;
  real          period = 25.74, t_first = 0.0;
  int           checks = 0, failures = 0;

  tdl_dll dut (.*);

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // free-running oscillator; t_first is the time of a rising edge
  initial begin
    #10;
    forever begin
      osc = 1'b1;
      #(period / 2.0);
      osc = 1'b0;
      #(period / 2.0);
    end
  end
  always @(posedge osc) t_first = $realtime;

  task automatic near(input real got, input real exp, input real tol, input string what);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: got %g expected %g", what, got, exp);
    end
  endtask

  task automatic snapshot(input string what);
    real ts, tk, ph;
    int bad;
    #(real'($urandom_range(0, 2574)) / 100.0);
    ts = $realtime;
    stop = 1'b1;
    #1;
    bad = 0;
    for (int k = 0; k < 144; k++) begin
      tk = ts - real'(k) * tau_ns;
      ph = tk - t_first;
      while (ph < 0.0) ph += period;
      while (ph >= period) ph -= period;
      if (ph > 0.01 && ph < period / 2.0 - 0.01 && q[k] !== 1'b1) bad++;
      if (ph > period / 2.0 + 0.01 && ph < period - 0.01 && q[k] !== 1'b0) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d latches wrong", what, bad); end
    #30 stop = 1'b0;
  endtask

  // vctrl that gives cell delay t with this vcal (delay law inverted)
  function automatic real v_for(real t);
    return 0.1 + $sqrt(0.1536 / t - (vcal - 0.1) * (vcal - 0.1));
  endfunction

  initial begin
    #(300 * 25.74);
    near(128.0 * tau_ns, period, 0.002 * period, "lock in 128-cell mode");
    near(vctrl, v_for(period / 128.0), 0.005, "control voltage at lock");
    for (int i = 0; i < 20; i++) snapshot("snapshot 128");
    period = 27.3;
    #(300 * 27.3);
    near(128.0 * tau_ns, period, 0.002 * period, "tracking a frequency step");
    for (int i = 0; i < 10; i++) snapshot("snapshot after step");
    sel64 = 1'b1;
    vcal  = 0.5;
    #(300 * 27.3);
    near(64.0 * tau_ns, period, 0.002 * period, "lock in 64-cell mode");
    near(vctrl, v_for(period / 64.0), 0.005, "control voltage in 64-cell mode");
    for (int i = 0; i < 10; i++) snapshot("snapshot 64");
    vcal = 0.8;
    #(300 * 27.3);
    near(vctrl, 0.5, 1e-9, "vcal too high: vctrl at the bottom");
    near(tau_ns, 0.1536 / (0.49 + 0.16), 1e-6, "vcal too high: longest delay");
    sel64  = 1'b0;
    vcal   = 0.5;
    period = 80.0;
    #(300 * 80.0);
    near(tau_ns, 0.48, 1e-6, "delay held at the top of its range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
