// tdc: coarse-fine time-to-digital converter that digitises the average
// oscillator frequency over the sensing time T_sns.
//
// Coarse: osc_counter counts full oscillator periods n between the release
// of rst and the rise of stop. Fine: at the rise of stop the latches of the
// tapped delay line (tdl_dll, locked so that M cells span one oscillator
// period) freeze the oscillator phase; tdl_decoder turns that snapshot into
// m, the number of cells the last rising edge of osc had passed. The
// digitised frequency is f_i = (n + m / M) / T_sns.
//
// sample_sync moves the frozen count into the clk domain and starts the
// decoder; done pulses for one clk cycle when cnt (= n) and dec (= m) are
// valid together, SYNC + 4 clk cycles after the first clk edge that sees
// stop high. sel64 (64_n128) selects M = 64 with 72 active taps instead of
// M = 128 with 144 taps, for a lower oscillator frequency range; it should
// only change while the oscillator is stopped. vcal is the delay line's
// calibration voltage (in volts), which sets the longest cell delay and so
// must suit the mode: about 0.8 V for 128 cells and 0.5 V for 64 cells at
// 38.85 MHz. tau_ns, err_ns and vctrl monitor the DLL cell delay, its last
// phase error and its control voltage (behavioural, for simulation).
//
// The partition (counter, 144-tap DLL-controlled delay line, sampler,
// decoder) and the port names follow the published TDC schematic; rst is an
// extra input here because the counter is cleared by the sequencer.
`timescale 1ns/1ps
module tdc
  import accel_pkg::*;
#(
  parameter int unsigned CW   = CNT_W,
  parameter int unsigned TAPS = TDL_TAPS,
  parameter int unsigned DW   = DEC_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          osc,
  input  logic          rst,
  input  logic          stop,
  input  logic          sel64,
  input  real           vcal,
  output logic          done,
  output logic [DW-1:0] dec,
  output logic [CW-1:0] cnt,
  output real           tau_ns,
  output real           err_ns,
  output real           vctrl
);

  logic [CW-1:0]   cnt_osc;
  logic [TAPS-1:0] q;
  logic            start;

  osc_counter #(.W(CW)) u_cnt (
    .osc  (osc),
    .rst  (rst),
    .stop (stop),
    .cnt  (cnt_osc)
  );

  tdl_dll #(.TAPS(TAPS)) u_tdl (
    .osc    (osc),
    .stop   (stop),
    .sel64  (sel64),
    .vcal   (vcal),
    .q      (q),
    .tau_ns (tau_ns),
    .err_ns (err_ns),
    .vctrl  (vctrl)
  );

  sample_sync #(.W(CW)) u_sync (
    .clk     (clk),
    .rst_n   (rst_n),
    .stop    (stop),
    .cnt_osc (cnt_osc),
    .cnt_q   (cnt),
    .start   (start)
  );

  tdl_decoder #(.TAPS(TAPS), .OUT_W(DW)) u_dec (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .size  (sel64),
    .tdl   (q),
    .done  (done),
    .out   (dec)
  );

endmodule
