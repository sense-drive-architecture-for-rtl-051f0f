// tb_mems_accel: checks the accelerometer model against closed-form values.
//   1. A constant -4.3 g settles at x = 4.3 g * m / k (about 30 nm).
//   2. ctop and cbot match C0*d0/(d0 -/+ x).
//   3. A constant 0.5 V top-mid voltage settles where k x equals the
//      electrostatic force, solved here by fixed-point iteration.
//   4. The same voltage on the bottom electrode gives the mirror position.
//   5. The undamped resonance: with ZETA = 0 a released mass swings with
//      period 1 / 5.94 kHz.
`timescale 1ns/1ps
module tb_mems_accel;
  localparam real D0 = 1.0e-6, K = 1.1, M = 0.78e-9, C0 = 128.0e-15;
  real accel = 0.0, vtm = 0.0, vbm = 0.0;
  real x, ctop, cbot;
  real accel2 = 0.0, vz = 0.0;
  real x2, ct2, cb2;
  int  checks = 0, failures = 0;

  mems_accel dut (.accel(accel), .vtm(vtm), .vbm(vbm), .x(x), .ctop(ctop), .cbot(cbot));
  mems_accel #(.ZETA(0.0)) dut_q (.accel(accel2), .vtm(vz), .vbm(vz), .x(x2), .ctop(ct2), .cbot(cb2));

  initial begin
    #20000000;
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
    real xe, fe, t0, t1;
    accel = -4.3 * 9.81;
    #600000;
    xe = 4.3 * 9.81 * M / K;
    near(x, xe, 0.01 * xe, "static displacement for -4.3 g");
    near(ctop, C0 * D0 / (D0 - x), 1e-18, "ctop");
    near(cbot, C0 * D0 / (D0 + x), 1e-18, "cbot");
    accel = 0.0; vtm = 0.5;
    #600000;
    xe = 0.0;
    repeat (50) begin
      fe = 0.5 * C0 * D0 * vtm * vtm / ((D0 - xe) * (D0 - xe));
      xe = fe / K;
    end
    near(x, xe, 0.01 * xe, "electrostatic pull towards top");
    vtm = 0.0; vbm = 0.5;
    #600000;
    near(x, -xe, 0.01 * xe, "electrostatic pull towards bottom");
    // resonance of the undamped model, started from rest under 1 g
    accel2 = 9.81;
    #10;
    accel2 = 0.0;
    @(x2);
    wait (x2 > 0.0);
    wait (x2 < 0.0); t0 = $realtime;
    wait (x2 > 0.0);
    wait (x2 < 0.0); t1 = $realtime;
    near(1.0e9 / (t1 - t0), $sqrt(K / M) / (2.0 * 3.14159265), 30.0, "resonant frequency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
