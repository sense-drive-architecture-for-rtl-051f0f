// mems_accel: behavioural model (not synthesizable) of the CMOS-MEMS
// capacitive accelerometer with a differential capacitive half-bridge.
//
// The proof mass is a second-order mass-spring-damper system,
//   m x'' + b x' + k x = -m a + F_el,
// so that at low frequency x = -a / w0^2. The electrostatic force for top-
// mid voltage vtm and bottom-mid voltage vbm is
//   F_el = 0.5 * C0 * d0 * (vtm^2 / (d0 - x)^2 - vbm^2 / (d0 + x)^2)
// (eps*A written as C0*d0), and the half-bridge capacitances are
//   ctop = C0 * d0 / (d0 - x),  cbot = C0 * d0 / (d0 + x).
// The equation is integrated with a semi-implicit Euler step every DT_NS.
//
// Defaults are the published prototype estimates: d0 = 1 um, k = 1.1 N/m,
// m = 0.78 ug (resonance 5.9 kHz), C0 = 128 fF. The damping ratio ZETA is
// this design's assumption (no damping value is published). Ports carry
// real numbers in SI units: accel in m/s^2, vtm and vbm in volts, x in
// metres, ctop and cbot in farads.
`timescale 1ns/1ps
module mems_accel #(
  parameter real D0    = 1.0e-6,
  parameter real K     = 1.1,
  parameter real MASS  = 0.78e-9,
  parameter real C0    = 128.0e-15,
  parameter real ZETA  = 1.0,
  parameter real DT_NS = 5.0
) (
  input  real accel,
  input  real vtm,
  input  real vbm,
  output real x,
  output real ctop,
  output real cbot
);

  real v;      // proof-mass velocity, m/s
  real fel;    // electrostatic force, N
  real b;      // damping coefficient, N s/m

  initial begin
    x = 0.0;
    v = 0.0;
    b = 2.0 * ZETA * $sqrt(K * MASS);
  end

  always begin
    #(DT_NS);
    fel = 0.5 * C0 * D0 * (vtm * vtm / ((D0 - x) * (D0 - x))
                          - vbm * vbm / ((D0 + x) * (D0 + x)));
    v = v + (DT_NS * 1.0e-9) * ((-MASS * accel + fel - b * v - K * x) / MASS);
    x = x + (DT_NS * 1.0e-9) * v;
  end

  assign ctop = C0 * D0 / (D0 - x);
  assign cbot = C0 * D0 / (D0 + x);

endmodule
