// accel_frontend: complete sense/drive front-end for a capacitive CMOS-MEMS
// accelerometer, with behavioural models of the sensor, the oscillator and
// the delay line around the digital TDC and sequencing logic.
//
// Signal chain: the input acceleration moves the proof mass of mems_accel;
// the capacitance ratio sets the frequency of relax_osc; the TDC digitises
// the frequency over each sensing slot as dout = 2^K * n + m (K = 7, or 6
// with sel64). sense_drive_seq alternates sensing slots and drive slots;
// in a drive slot fb_drive applies PWM or PDM electrostatic force pulses,
// for self-test or for closed-loop operation with an external digital
// controller on the dfb / dir / duty inputs.
//
// Ports:
//   clk, rst_n        reference clock (200 MHz nominal), async reset
//   en                run; low parks the oscillator in reset/shut-down
//   sel64             64-cell TDL mode (lower oscillator frequency range)
//   vcal_mv           delay-line calibration voltage in mV (about 800 for
//                     128 cells, 500 for 64 cells at 38.85 MHz)
//   accel_mg          external acceleration in milli-g, signed
//   pwm_npdm, duty,   force-feedback control, see fb_drive
//   dir, dfb
//   dout, dout_valid  result of each sensing slot (valid pulse)
//   cnt, dec          its coarse and fine parts
//   osc, fu, fd, rst, stop  monitors of the oscillator and switch controls
// At the defaults a frame is 10 us: 5 us sensing then 5 us drive, and the
// frequency LSB is 1 / (128 * 5 us) = 1.5625 kHz. The internal reals x
// (proof-mass displacement), tau_ns, err_ns and vctrl (delay-line state)
// drive no port; they are there for a testbench to probe.
`timescale 1ns/1ps
module accel_frontend
  import accel_pkg::*;
#(
  parameter int unsigned SENSE_CYC = 1000,
  parameter int unsigned DRIVE_CYC = 1000,
  parameter int unsigned RST_CYC   = 20,
  parameter int unsigned DUTY_W    = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               sel64,
  input  logic        [9:0]  vcal_mv,
  input  logic signed [15:0] accel_mg,
  input  logic               pwm_npdm,
  input  logic [DUTY_W-1:0]  duty,
  input  logic               dir,
  input  logic               dfb,
  output logic [DOUT_W-1:0]  dout,
  output logic               dout_valid,
  output logic [CNT_W-1:0]   cnt,
  output logic [DEC_W-1:0]   dec,
  output logic               osc,
  output logic               fu,
  output logic               fd,
  output logic               rst,
  output logic               stop
);

  osc_mode_e mode;
  logic      drive_start, f, done;
  real       accel, vtm, vbm, x, ctop, cbot, tau_ns, err_ns, vcal, vctrl;

  assign accel = real'(accel_mg) * 9.81e-3;
  assign vcal  = real'(vcal_mv) * 1.0e-3;

  sense_drive_seq #(
    .SENSE_CYC (SENSE_CYC),
    .DRIVE_CYC (DRIVE_CYC),
    .RST_CYC   (RST_CYC)
  ) u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .en          (en),
    .mode        (mode),
    .rst         (rst),
    .stop        (stop),
    .drive_start (drive_start)
  );

  fb_drive #(.DUTY_W(DUTY_W)) u_drv (
    .clk         (clk),
    .rst_n       (rst_n),
    .mode        (mode),
    .drive_start (drive_start),
    .pwm_npdm    (pwm_npdm),
    .duty        (duty),
    .dir         (dir),
    .dfb         (dfb),
    .f           (f),
    .fu          (fu),
    .fd          (fd)
  );

  mems_accel u_mems (
    .accel (accel),
    .vtm   (vtm),
    .vbm   (vbm),
    .x     (x),
    .ctop  (ctop),
    .cbot  (cbot)
  );

  relax_osc u_osc (
    .rst  (rst),
    .f    (f),
    .fu   (fu),
    .fd   (fd),
    .ctop (ctop),
    .cbot (cbot),
    .osc  (osc),
    .vtm  (vtm),
    .vbm  (vbm)
  );

  tdc u_tdc (
    .clk    (clk),
    .rst_n  (rst_n),
    .osc    (osc),
    .rst    (rst),
    .stop   (stop),
    .sel64  (sel64),
    .vcal   (vcal),
    .done   (done),
    .dec    (dec),
    .cnt    (cnt),
    .tau_ns (tau_ns),
    .err_ns (err_ns),
    .vctrl  (vctrl)
  );

  dout_combine u_out (
    .clk        (clk),
    .rst_n      (rst_n),
    .done       (done),
    .sel64      (sel64),
    .cnt        (cnt),
    .dec        (dec),
    .dout       (dout),
    .dout_valid (dout_valid)
  );

endmodule
