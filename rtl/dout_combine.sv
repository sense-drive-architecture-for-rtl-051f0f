// dout_combine: joins the coarse count and the fine code into dout.
//
// With an effective delay-line length M = 2^K the digitised frequency is
// proportional to 2^K * n + m, where n is the number of full oscillator
// periods in the sensing time and m the decoded delay-line position. K is 7
// in 128-cell mode and 6 in 64-cell mode (sel64 high). The shift-and-add is
// registered when the decoder reports done; dout_valid pulses for one clk
// cycle with the new value, which is held until the next one.
//
// Example (128-cell mode): n = 193, m = 8 gives dout = 24712.
// The register stage and the valid pulse are this design's choices.
`timescale 1ns/1ps
module dout_combine #(
  parameter int unsigned CNT_W = accel_pkg::CNT_W,
  parameter int unsigned DEC_W = accel_pkg::DEC_W,
  parameter int unsigned OUT_W = CNT_W + DEC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             done,
  input  logic             sel64,
  input  logic [CNT_W-1:0] cnt,
  input  logic [DEC_W-1:0] dec,
  output logic [OUT_W-1:0] dout,
  output logic             dout_valid
);

  logic [OUT_W-1:0] sum;

  always_comb begin
    if (sel64)
      sum = (OUT_W'(cnt) << 6) + OUT_W'(dec);
    else
      sum = (OUT_W'(cnt) << 7) + OUT_W'(dec);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= done;
      if (done)
        dout <= sum;
    end
  end

endmodule
