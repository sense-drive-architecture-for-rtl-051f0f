// relax_osc: behavioural model (not synthesizable) of the sawtooth
// relaxation oscillator controlled by the accelerometer capacitance ratio.
//
// In sensing mode the output osc drives the MEMS top and bottom electrodes
// in antiphase; the mid-node step, set by the capacitance ratio, is
// compared with a current-charged ramp, and each comparator crossing flips
// an SR latch. Ignoring comparator delay the frequency is
//   f = F0 / 2 * (1 + cbot / ctop) = F0 * d0 / (d0 + x),
// where F0 = Ic / (C1 * Vdd) is the zero-displacement frequency. The model
// makes each half period 1 / (2 f), with f evaluated from ctop and cbot at
// the start of the half period.
//
// Modes (inputs are the switch controls of the circuit):
//   rst high     reset / shut-down: osc held low, all MEMS terminals at
//                Vdd/2, so no electrostatic force (vtm = vbm = 0)
//   f high       force-feedback drive: osc held low, mid grounded, top
//                (fu) or bottom (fd) clamped to V_fb, the other grounded
//   otherwise    sensing; osc starts low and rises half a period later
// In sensing the net electrostatic force is neglected (vtm = vbm = 0).
//
// F0 = 38.85 MHz and V_fb = 3.3 V are the published post-layout values;
// the equal split of the period into two halves and neglecting the sensing
// force are this model's simplifications.
`timescale 1ns/1ps
module relax_osc #(
  parameter real F0_HZ = 38.85e6,
  parameter real VFB   = 3.3
) (
  input  logic rst,
  input  logic f,
  input  logic fu,
  input  logic fd,
  input  real  ctop,
  input  real  cbot,
  output logic osc,
  output real  vtm,
  output real  vbm
);

  logic run;
  logic latch_q;   // SR latch state; forced low as soon as run drops
  real  half_ns;

  assign run = !rst && !f;

  initial latch_q = 1'b0;

  always begin
    if (!run) begin
      latch_q = 1'b0;
      @(posedge run);
    end
    half_ns = 1.0e9 / (F0_HZ * (1.0 + cbot / ctop));
    #(half_ns);
    if (run)
      latch_q = !latch_q;
  end

  assign osc = run && latch_q;

  assign vtm = (f && fu) ? VFB : 0.0;
  assign vbm = (f && fd) ? VFB : 0.0;

endmodule
