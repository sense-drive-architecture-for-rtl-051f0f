// tb_relax_osc: checks the oscillator model. For several proof-mass
// positions the measured frequency must equal F0 * d0 / (d0 + x) computed
// from the capacitances; osc must stay low in reset and in drive mode and
// restart low with its first rising edge half a period after release; the
// electrode voltages must follow fu / fd in drive mode.
`timescale 1ns/1ps
module tb_relax_osc;
  localparam real F0 = 38.85e6, D0 = 1.0e-6, C0 = 128.0e-15;
  logic rst = 1'b1, f = 1'b0, fu = 1'b0, fd = 1'b0;
  real  ctop = C0, cbot = C0;
  logic osc;
  real  vtm, vbm;
  int   checks = 0, failures = 0;

  relax_osc dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(input real got, input real exp, input real tol, input string what);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: got %g expected %g", what, got, exp);
    end
  endtask

  initial begin
    real xs[5] = '{0.0, 10.0e-9, 30.0e-9, -20.0e-9, 50.0e-9};
    real t0, t1, fexp, tr;
    int  seen;
    foreach (xs[i]) begin
      ctop = C0 * D0 / (D0 - xs[i]);
      cbot = C0 * D0 / (D0 + xs[i]);
      rst = 1'b1; #50;
      checks++;
      if (osc) begin failures++; $display("FAIL osc high in reset"); end
      rst = 1'b0; tr = $realtime;
      @(posedge osc); t0 = $realtime;
      fexp = F0 * D0 / (D0 + xs[i]);
      near(t0 - tr, 0.5e9 / fexp, 0.01, "first edge after half a period");
      repeat (100) @(posedge osc);
      t1 = $realtime;
      near(100.0e9 / (t1 - t0), fexp, fexp * 1e-4, "frequency vs displacement");
    end
    // drive mode: oscillator stopped, electrodes follow fu / fd
    f = 1'b1; fu = 1'b1;
    seen = 0;
    repeat (200) begin #1; if (osc) seen++; end
    checks++;
    if (seen != 0) begin failures++; $display("FAIL osc running in drive mode"); end
    near(vtm, 3.3, 1e-9, "top at V_fb");
    near(vbm, 0.0, 1e-9, "bottom grounded");
    fu = 1'b0; fd = 1'b1; #1;
    near(vtm, 0.0, 1e-9, "top grounded");
    near(vbm, 3.3, 1e-9, "bottom at V_fb");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
