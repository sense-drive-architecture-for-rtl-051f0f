// tb_accel_frontend: end-to-end test of the whole front-end at its default
// parameters (200 MHz clock, 5 us sensing + 5 us drive per 10 us frame,
// 144-tap delay line, 11-bit counter).
//
// Every result is checked against the oscillator edges the testbench
// watches on the osc / rst / stop ports: dout must equal M * n + m, with n
// the rising edges between the release of rst and the rise of stop and m
// = ceil(time since the last rising edge / (period / M)), within 1 LSB.
// On top of that the run goes through the operating modes:
//   A  no force, 128-cell mode: dout = 128 * (F0 * T_sns + 1/2) within 4
//      LSB (the oscillator's first rising edge comes half a period after
//      the start of sensing, and every counted edge credits a full period)
//   A2 +1 g on the acceleration input: dout rises by about 173 LSB, the
//      sensitivity that follows from m / k and F0 (about 5.8 mg per LSB)
//   B  PWM self-test, 5 % duty on the top electrode: the proof mass moves
//      by about K * C0 * Vfb^2 / (2 k d0) = 32 nm and dout falls by the
//      matching 3 %, checked to lie between 650 and 900 LSB
//   C  the same pulses on the bottom electrode: dout rises as much
//   D  PDM with alternating dfb: net force zero, dout returns near A
//   E  shut-down (en low): no results, oscillator silent
//   F  64-cell mode, calibration voltage lowered from 0.8 V to 0.5 V so
//      the longer cell delay is in reach: dout = 64 * (F0 * T_sns + 1/2)
//      within 4 LSB
// Each mechanism (sensing result, PWM up and down pulses, PDM up and down
// pulses, shut-down, 64-cell result, DLL in lock at the stop edge,
// response to the acceleration input) is
// counted, and one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_accel_frontend;
  localparam real F0 = 38.85e6, TSNS = 5.0e-6;
  localparam real BASE128 = 128.0 * (F0 * TSNS + 0.5);
  localparam real BASE64  = 64.0 * (F0 * TSNS + 0.5);

  logic               clk = 1'b0, rst_n = 1'b0, en = 1'b0, sel64 = 1'b0;
  logic signed [15:0] accel_mg = '0;
  logic        [9:0]  vcal_mv = 10'd800;
  logic               pwm_npdm = 1'b1, dir = 1'b0, dfb = 1'b0;
  logic [9:0]         duty = '0;
  logic [18:0]        dout;
  logic               dout_valid;
  logic [10:0]        cnt;
  logic [7:0]         dec;
  logic               osc, fu, fd, rst, stop;

  int checks = 0, failures = 0;
  int n_sense = 0, n_pwm_up = 0, n_pwm_dn = 0, n_pdm_up = 0, n_pdm_dn = 0;
  int n_shutdown = 0, n_m64 = 0, n_locked = 0, n_accel = 0;

  accel_frontend dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- independent edge bookkeeping on the ports --------------------------
  int  edges;
  real t_last = 0.0, p_last = 25.74, t_stop = 0.0;
  int  exp_dout;
  logic exp_ready = 1'b0;

  always @(posedge osc) begin
    if (t_last > 0.0 && $realtime - t_last < 40.0) p_last = $realtime - t_last;
    t_last = $realtime;
    if (!rst && !stop) edges++;
  end
  always @(negedge rst) edges = 0;
  always @(posedge stop) begin
    real mm;
    if (!rst) begin
      mm = sel64 ? 64.0 : 128.0;
      t_stop   = $realtime;
      exp_dout = int'(mm) * edges + int'($ceil((t_stop - t_last) / (p_last / mm)));
      exp_ready = 1'b1;
      if (mm * dut.u_tdc.tau_ns - p_last < 0.005 * p_last && p_last - mm * dut.u_tdc.tau_ns < 0.005 * p_last) n_locked++;
    end
  end

  // pulse counting (rising edges of fu / fd)
  always @(posedge fu) if (pwm_npdm) n_pwm_up++; else n_pdm_up++;
  always @(posedge fd) if (pwm_npdm) n_pwm_dn++; else n_pdm_dn++;

  // ---- result checking ---------------------------------------------------
  int last_dout;
  always @(posedge clk) begin
    if (dout_valid && rst_n) begin
      n_sense++;
      if (sel64) n_m64++;
      last_dout = int'(dout);
      checks++;
      if (!exp_ready || int'(dout) < exp_dout - 1 || int'(dout) > exp_dout + 1) begin
        failures++;
        $display("FAIL dout=%0d (cnt %0d dec %0d) expected %0d from osc edges at %0t",
                 dout, cnt, dec, exp_dout, $time);
      end
      exp_ready <= 1'b0;
    end
  end

  task automatic frames(input int n);
    repeat (n) @(posedge dout_valid);
    @(negedge clk);
  endtask

  task automatic near(input real got, input real lo, input real hi, input string what);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: %f not in [%f, %f]", what, got, lo, hi);
    end else
      $display("ok   %s: %f", what, got);
  endtask

  initial begin
    real base;
    int  seen;
    #20 rst_n = 1'b1;
    en = 1'b1;
    // A: sensing only
    frames(6);
    base = real'(last_dout);
    near(base, BASE128 - 4.0, BASE128 + 4.0, "A  zero-force output, 128 cells");
    // A2: +1 g input acceleration moves the mass by -g*m/k = -6.96 nm, so
    // the frequency rises by 0.696 %: 24929 * 0.00696 = 173 LSB (5.8 mg/LSB)
    accel_mg = 16'sd1000;
    frames(40);
    near(real'(last_dout) - base, 150.0, 200.0, "A2 +1 g input: output rise");
    if (real'(last_dout) - base > 150.0) n_accel++;
    accel_mg = '0;
    // B: PWM self-test, top electrode, 100 of 2000 cycles = 5 %
    duty = 10'd100; dir = 1'b0; pwm_npdm = 1'b1;
    frames(70);
    near(base - real'(last_dout), 650.0, 900.0, "B  PWM top: output drop");
    $display("     displacement %0.2f nm", dut.u_mems.x * 1.0e9);
    // C: PWM on the bottom electrode
    dir = 1'b1;
    frames(90);
    near(real'(last_dout) - base, 650.0, 950.0, "C  PWM bottom: output rise");
    // D: PDM, alternating direction each frame
    pwm_npdm = 1'b0;
    fork
      forever begin @(posedge dut.drive_start); dfb = ~dfb; end
    join_none
    frames(90);
    near(real'(last_dout) - base, -100.0, 100.0, "D  PDM balanced: back near zero force");
    disable fork;
    duty = '0;
    // E: shut-down
    en = 1'b0;
    repeat (20) @(posedge clk);
    seen = 0;
    repeat (4000) begin
      @(posedge clk);
      if (osc || dout_valid || !rst) seen++;
    end
    checks++;
    if (seen != 0) begin failures++; $display("FAIL activity during shut-down"); end
    else n_shutdown++;
    // F: 64-cell mode, switched while the oscillator is stopped
    frames(0);
    sel64   = 1'b1;
    vcal_mv = 10'd500;
    en = 1'b1;
    frames(30);
    near(real'(last_dout), BASE64 - 4.0, BASE64 + 4.0, "F  zero-force output, 64 cells");

    $display("mechanisms: sense=%0d pwm_up=%0d pwm_dn=%0d pdm_up=%0d pdm_dn=%0d shutdown=%0d m64=%0d dll_locked=%0d accel=%0d",
             n_sense, n_pwm_up, n_pwm_dn, n_pdm_up, n_pdm_dn, n_shutdown, n_m64, n_locked, n_accel);
    checks++; if (n_sense    == 0) failures++;
    checks++; if (n_pwm_up   == 0) failures++;
    checks++; if (n_pwm_dn   == 0) failures++;
    checks++; if (n_pdm_up   == 0) failures++;
    checks++; if (n_pdm_dn   == 0) failures++;
    checks++; if (n_shutdown == 0) failures++;
    checks++; if (n_m64      == 0) failures++;
    checks++; if (n_locked   == 0) failures++;
    checks++; if (n_accel    == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
