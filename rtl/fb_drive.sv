// fb_drive: PWM/PDM electrostatic actuation pulses for self-test or
// closed-loop force feedback.
//
// In the drive slot the oscillator's integrating capacitors are discharged
// and the MEMS mid node is grounded (f high). A force pulse clamps one of
// the top or bottom electrodes to the feedback voltage V_fb (fu or fd high)
// while the other stays grounded. The equivalent acceleration is
// proportional to the pulse duty cycle K.
//
//   PWM (pwm_npdm = 1): every drive slot carries one pulse of duty clk
//     cycles on the electrode chosen by dir (0: top/fu, 1: bottom/fd).
//     With 2000-cycle frames, duty = 100 is a 5 % duty cycle; the largest
//     possible duty is the drive slot, i.e. 50 %.
//   PDM (pwm_npdm = 0): every drive slot carries one pulse of fixed width
//     duty; the one-bit feedback input dfb picks
//     its direction (1: top/fu, 0: bottom/fd), so an external controller can
//     set the pulse density of each direction.
//
// duty, dir, dfb and pwm_npdm are sampled START_DLY + 1 cycles after
// drive_start and the pulse starts on the next cycle. The delay lets an
// external controller answer the result of the sensing slot that has just
// ended (dout_valid comes 7 cycles after drive_start) within the same
// frame. Pulses are cut off as soon as the mode leaves MODE_DRIVE, so fu
// and fd are never high outside the drive slot and never together. The pulse position inside the slot and the PDM
// coding are this design's choices; the published front-end only states
// that PWM or PDM pulses are applied in a drive mode time-multiplexed with
// sensing.
`timescale 1ns/1ps
module fb_drive
  import accel_pkg::*;
#(
  parameter int unsigned DUTY_W    = 10,
  parameter int unsigned START_DLY = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  osc_mode_e         mode,
  input  logic              drive_start,
  input  logic              pwm_npdm,
  input  logic [DUTY_W-1:0] duty,
  input  logic              dir,
  input  logic              dfb,
  output logic              f,
  output logic              fu,
  output logic              fd
);

  localparam int unsigned DW = $clog2(START_DLY + 2);

  logic [DUTY_W-1:0] left;    // pulse cycles still to go
  logic [DW-1:0]     dly;     // cycles until the pulse is set up
  logic              armed;   // waiting to set up this slot's pulse
  logic              to_bot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left   <= '0;
      dly    <= '0;
      armed  <= 1'b0;
      to_bot <= 1'b0;
    end else if (mode != MODE_DRIVE) begin
      left  <= '0;
      armed <= 1'b0;
    end else if (drive_start) begin
      dly   <= DW'(START_DLY);
      armed <= 1'b1;
    end else if (armed) begin
      if (dly != '0)
        dly <= dly - 1'b1;
      else begin
        armed  <= 1'b0;
        left   <= duty;
        to_bot <= pwm_npdm ? dir : !dfb;
      end
    end else if (left != '0) begin
      left <= left - 1'b1;
    end
  end

  assign f  = (mode == MODE_DRIVE);
  assign fu = f && (left != '0) && !to_bot;
  assign fd = f && (left != '0) &&  to_bot;

  // Force pulses never overlap and never leave the drive slot.
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(fu && fd));
  a_slot: assert property (@(posedge clk) disable iff (!rst_n) (fu || fd) |-> f);

endmodule
