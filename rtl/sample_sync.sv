// sample_sync: counter sampling-and-synchronising block of the TDC.
//
// The oscillator counter lives in the osc clock domain; the decoder and the
// output run on the system clock clk. This block brings the stop signal
// into the clk domain through a SYNC-stage synchroniser, detects its rising
// edge, and on that cycle copies the (by then frozen) counter value into a
// clk-domain register and issues a one-cycle start pulse to the delay-line
// decoder. Because osc_counter stops counting at the first oscillator edge
// that sees stop high, the counter is stable for at least one clk period
// before it is copied, so the copy never catches it mid-change and the
// coarse count always matches the delay-line snapshot taken at the same
// stop edge.
//
// Timing: start and cnt_q are valid SYNC+1 clk cycles after the first clk
// edge that sees stop high. Reset (rst_n, asynchronous, active low) clears
// all state; the synchroniser resets to "stop high", so leaving reset
// with stop already high produces no result. The synchroniser depth and the freeze-then-copy scheme are
// this design's own; the published design names a result-consistent
// sampling scheme without giving its circuit.
`timescale 1ns/1ps
module sample_sync #(
  parameter int unsigned W    = accel_pkg::CNT_W,
  parameter int unsigned SYNC = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         stop,
  input  logic [W-1:0] cnt_osc,
  output logic [W-1:0] cnt_q,
  output logic         start
);

  logic [SYNC-1:0] stop_sync;
  logic            stop_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stop_sync <= '1;   // stop is high while the front-end is held in reset
      stop_d    <= 1'b1;
      cnt_q     <= '0;
      start     <= 1'b0;
    end else begin
      stop_sync <= {stop_sync[SYNC-2:0], stop};
      stop_d    <= stop_sync[SYNC-1];
      start     <= stop_sync[SYNC-1] && !stop_d;
      if (stop_sync[SYNC-1] && !stop_d)
        cnt_q <= cnt_osc;
    end
  end

endmodule
