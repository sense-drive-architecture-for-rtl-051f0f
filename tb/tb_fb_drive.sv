// tb_fb_drive: checks the force-feedback pulse generator. In PWM mode the
// pulse on the electrode chosen by dir must last exactly duty cycles and
// start START_DLY + 2 cycles after drive_start; in PDM mode dfb picks the electrode. A
// pulse longer than the drive slot must stop when the mode leaves
// MODE_DRIVE; f must follow the drive mode; fu and fd never overlap.
`timescale 1ns/1ps
module tb_fb_drive;
  import accel_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  osc_mode_e  mode = MODE_SENSE;
  logic       drive_start = 1'b0, pwm_npdm = 1'b1, dir = 1'b0, dfb = 1'b0;
  logic [9:0] duty = '0;
  logic       f, fu, fd;
  int         checks = 0, failures = 0;
  localparam int DLY = 10;   // START_DLY default

  fb_drive dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic slot(input int slot_len, input int w, input logic pwm, input logic d, input logic b);
    int nu, nd, first, exp_w;
    logic exp_up;
    duty = 10'(w); pwm_npdm = pwm; dir = d; dfb = b;
    @(negedge clk); mode = MODE_DRIVE; drive_start = 1'b1;
    @(negedge clk); drive_start = 1'b0;
    nu = 0; nd = 0; first = -1;
    for (int c = 1; c < slot_len; c++) begin
      checks++;
      if (!f || (fu && fd)) begin failures++; $display("FAIL f/overlap"); end
      if ((fu || fd) && first < 0) first = c;
      nu += int'(fu); nd += int'(fd);
      @(negedge clk);
    end
    mode = MODE_RESET;
    #0.1;
    checks++;
    if (f || fu || fd) begin failures++; $display("FAIL pulse outside drive slot"); end
    exp_w  = (w < slot_len - 1 - (DLY + 1)) ? w : slot_len - 1 - (DLY + 1);
    exp_up = pwm ? !d : b;
    checks++;
    if ((exp_up ? nu : nd) != exp_w || (exp_up ? nd : nu) != 0 || (w > 0 && first != DLY + 2)) begin
      failures++;
      $display("FAIL pwm=%0d dir=%0d dfb=%0d duty=%0d: fu=%0d fd=%0d first=%0d", pwm, d, b, w, nu, nd, first);
    end
    repeat (3) @(negedge clk);
    mode = MODE_SENSE;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    #12 rst_n = 1'b1;
    slot(980, 100, 1'b1, 1'b0, 1'b0);   // 5 % of a 2000-cycle frame, top electrode
    slot(980, 100, 1'b1, 1'b1, 1'b0);   // bottom electrode
    slot(980, 0,   1'b1, 1'b0, 1'b0);   // no force
    slot(50,  200, 1'b1, 1'b0, 1'b0);   // cut off by end of slot
    for (int i = 0; i < 60; i++)
      slot(40 + int'($urandom_range(0, 60)), int'($urandom_range(0, 80)),
           1'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
