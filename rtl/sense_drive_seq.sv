// sense_drive_seq: time-multiplexing of sensing and force-feedback drive.
//
// From the reference clock clk this block cuts time into frames of
// SENSE_CYC + DRIVE_CYC cycles. Each frame is a sensing slot of SENSE_CYC
// cycles (the TDC sensing time T_sns, oscillator free-running) followed by
// a drive slot of DRIVE_CYC cycles whose last RST_CYC cycles are the
// periodic reset that removes the charge from the high-impedance mid node.
// With clk = 200 MHz the defaults give T_sns = 5 us and a drive slot of the
// same 5 us, the published operating point. When en is low the block parks
// in reset, which is the oscillator's shut-down mode.
//
// Outputs, all registered:
//   mode        current oscillator mode (reset / sense / drive)
//   rst         high in reset: clears the coarse counter, clamps the MEMS
//   stop        low only during sensing; its rising edge ends T_sns and
//               latches the delay line
//   drive_start one-cycle pulse on the first cycle of a drive slot
// rst is held low while rst_n is asserted and rises on the first clk after
// it is released, so the coarse counter always sees a clearing edge.
// T_sns is measured from the fall of rst/stop to the rise of stop. The
// reset length and the placement of reset at the end of the drive slot are
// this design's choices.
`timescale 1ns/1ps
module sense_drive_seq
  import accel_pkg::*;
#(
  parameter int unsigned SENSE_CYC = 1000,
  parameter int unsigned DRIVE_CYC = 1000,
  parameter int unsigned RST_CYC   = 20
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  output osc_mode_e mode,
  output logic      rst,
  output logic      stop,
  output logic      drive_start
);

  localparam int unsigned CW = $clog2(SENSE_CYC + DRIVE_CYC + 1);

  logic [CW-1:0] left;   // cycles left in the current phase, minus one
  logic          armed;  // low while rst_n is asserted, high from the next clk on

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode        <= MODE_RESET;
      left        <= CW'(RST_CYC - 1);
      drive_start <= 1'b0;
      armed       <= 1'b0;
    end else begin
      armed       <= 1'b1;
      drive_start <= 1'b0;
      if (!en) begin
        mode <= MODE_RESET;
        left <= CW'(RST_CYC - 1);
      end else if (left != '0) begin
        left <= left - 1'b1;
      end else begin
        unique case (mode)
          MODE_RESET: begin
            mode <= MODE_SENSE;
            left <= CW'(SENSE_CYC - 1);
          end
          MODE_SENSE: begin
            mode        <= MODE_DRIVE;
            left        <= CW'(DRIVE_CYC - RST_CYC - 1);
            drive_start <= 1'b1;
          end
          default: begin
            mode <= MODE_RESET;
            left <= CW'(RST_CYC - 1);
          end
        endcase
      end
    end
  end

  assign rst  = (mode == MODE_RESET) && armed;
  assign stop = (mode != MODE_SENSE);

endmodule
