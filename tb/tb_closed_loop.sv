// tb_closed_loop: the front-end in closed-loop (force-feedback) operation.
//
// The testbench plays the external digital controller: after each sensing
// result it compares dout with the zero-force value and sets dfb for the
// next drive slot (dout above: mass pushed towards the bottom, pull top,
// dfb = 1; below: dfb = 0). The drive pulse starts late enough in the
// drive slot for the decision to act in the same frame. With PDM pulses of 100 clk cycles (5 % of a
// frame) each pulse is worth a_p = K * C0 * Vfb^2 / (2 m d0) = 4.55 g, so
// the loop balances an input a with a fraction p = 1/2 + a / (2 a_p) of
// top pulses: a mechanical sigma-delta modulator whose bit stream is dfb.
// Checks, for inputs of 0, +1 g, -1.5 g and +2.2 g: the measured density over the
// last 150 of 250 frames is within 0.05 of p, and dout stays within 150
// LSB of the set point, i.e. the mass is held near the centre.
`timescale 1ns/1ps
module tb_closed_loop;
  localparam real AP = 0.05 * 128.0e-15 * 3.3 * 3.3 / (2.0 * 0.78e-9 * 1.0e-6) / 9.81;

  logic               clk = 1'b0, rst_n = 1'b0, en = 1'b0, sel64 = 1'b0;
  logic signed [15:0] accel_mg = '0;
  logic        [9:0]  vcal_mv = 10'd800;
  logic               pwm_npdm = 1'b0, dir = 1'b0, dfb = 1'b0;
  logic [9:0]         duty = 10'd100;
  logic [18:0]        dout;
  logic               dout_valid;
  logic [10:0]        cnt;
  logic [7:0]         dec;
  logic               osc, fu, fd, rst, stop;
  int                 checks = 0, failures = 0;
  int                 setpoint = 0;

  accel_frontend dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #12000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // controller: one decision per result, used in the same frame's drive slot
  always @(posedge clk)
    if (rst_n && dout_valid && setpoint != 0)
      dfb <= (int'(dout) > setpoint);

  task automatic run_point(input real a_g);
    int ups, n, worst;
    real p, pexp;
    accel_mg = 16'(int'(a_g * 1000.0));
    ups = 0; n = 0; worst = 0;
    repeat (250) begin
      @(posedge clk iff dout_valid);
      n++;
      if (n > 100) begin
        if (dfb) ups++;
        if ($signed(int'(dout) - setpoint) > worst) worst = int'(dout) - setpoint;
        if ($signed(setpoint - int'(dout)) > worst) worst = setpoint - int'(dout);
      end
    end
    p    = real'(ups) / 150.0;
    pexp = 0.5 + a_g / (2.0 * AP);
    checks++;
    if (p < pexp - 0.05 || p > pexp + 0.05) begin
      failures++;
      $display("FAIL %0.2f g: density %0.3f expected %0.3f", a_g, p, pexp);
    end else
      $display("ok   %0.2f g: density %0.3f expected %0.3f", a_g, p, pexp);
    checks++;
    if (worst > 150) begin
      failures++;
      $display("FAIL %0.2f g: dout strayed %0d LSB from the set point", a_g, worst);
    end
  endtask

  initial begin
    #20 rst_n = 1'b1;
    // open loop with no pulses to find the set point
    duty = '0; en = 1'b1;
    repeat (5) @(posedge clk iff dout_valid);
    setpoint = int'(dout);
    duty = 10'd100;
    run_point(0.0);
    run_point(1.0);
    run_point(-1.5);
    run_point(2.2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
