// tdl_dll: behavioural model (not synthesizable) of the 144-cell tapped
// delay line with its charge-pump delay-locked loop.
//
// Each delay cell is a current-starved inverter pair. Its delay tau falls as
// two NMOS gate voltages rise: vcal (calibration, sets the longest delay
// the loop can reach) and vctrl (the charge-pump output). Each cell input
// is loaded by a D-latch that is transparent while clk_s (stop) is low. The
// oscillator drives cell 1, so at the rising edge of stop latch k holds osc
// as it was (k-1)*tau earlier:
//   q[k-1] = osc(t_stop - (k-1) * tau),  k = 1..TAPS.
// The model keeps the times of the last HIST oscillator edges and evaluates
// this at the stop edge; the word is held until the next stop edge.
//
// Delay law: the two transistor pairs add their currents, each taken as a
// square law above VTH, so
//   tau = TAU_K_NS / ((vcal - VTH)^2 + (vctrl - VTH)^2).
// With the defaults it gives 0.48 ns with both voltages at 0.5 V and about
// 0.1 ns with both at 1 V, and like the published delay-cell curves the
// delay depends on vctrl strongly at a low vcal and weakly at a high one.
// It follows those curves only roughly. vctrl stays in the plotted range
// VCTRL_MIN..VCTRL_MAX.
//
// Loop: the phase detector compares the oscillator with the output of cell
// 128 (cell 64 when sel64 is high, the name 64_n128 of the circuit), so at
// lock M * tau = 1/f with M = 128 or 64. On each oscillator rising edge the
// model takes the previous edge's arrival at cell M minus the present edge
// as the phase error; the charge pump drives ICP_UA into CDLL_PF for that
// long (up when the line is slow, down when it is fast), which moves vctrl
// by ICP * err / CDLL. Pairs of edges further apart than twice the longest
// lockable period, M * tau(vcal, VCTRL_MIN) (the oscillator was stopped in
// between), are not compared. vcal must let the loop reach 1/(M f): with
// the defaults about 0.8 V suits 128-cell mode at 38.85 MHz and 0.5 V suits
// 64-cell mode.
//
// The two control voltages, the charge pump and the 0.5-1 V control range
// follow the published delay cell; the square law, VTH, TAU_K_NS, the pump
// current and capacitor, VCTRL0 and the edge-history depth are this
// model's choices. tau_ns, err_ns and vctrl are monitor outputs.
`timescale 1ns/1ps
module tdl_dll #(
  parameter int unsigned TAPS      = 144,
  parameter real         VTH       = 0.1,
  parameter real         TAU_K_NS  = 0.1536,
  parameter real         VCTRL0    = 0.75,
  parameter real         VCTRL_MIN = 0.5,
  parameter real         VCTRL_MAX = 1.0,
  parameter real         ICP_UA    = 5.0,
  parameter real         CDLL_PF   = 1.0,
  parameter int unsigned HIST      = 16
) (
  input  logic            osc,
  input  logic            stop,
  input  logic            sel64,
  input  real             vcal,
  output logic [TAPS-1:0] q,
  output real             tau_ns,
  output real             err_ns,
  output real             vctrl
);

  real         edge_t [HIST];   // time of stored edge
  logic        edge_v [HIST];   // osc level after that edge
  int unsigned wr;              // next slot to write
  real         last_rise;
  logic        have_rise;

  // square-law drive of one transistor pair
  function automatic real drive(real v);
    return (v > VTH) ? (v - VTH) * (v - VTH) : 0.0;
  endfunction

  // cell delay in ns; vctrl is never below VCTRL_MIN, so the sum is > 0
  function automatic real cell_delay(real vc, real vt);
    return TAU_K_NS / (drive(vc) + drive(vt));
  endfunction

  assign tau_ns = cell_delay(vcal, vctrl);

  initial begin
    vctrl     = VCTRL0;
    err_ns    = 0.0;
    wr        = 0;
    have_rise = 1'b0;
    last_rise = 0.0;
    q         = '0;
    for (int i = 0; i < int'(HIST); i++) begin
      edge_t[i] = -1.0e9;
      edge_v[i] = 1'b0;
    end
  end

  // Level of osc at time t, from the edge history (low before any edge).
  function automatic logic level_at(real t);
    real  best_t;
    logic lvl;
    best_t = -2.0e9;
    lvl    = 1'b0;
    for (int i = 0; i < int'(HIST); i++)
      if (edge_t[i] <= t && edge_t[i] > best_t) begin
        best_t = edge_t[i];
        lvl    = edge_v[i];
      end
    return lvl;
  endfunction

  always @(osc) begin
    real m;
    real now;
    now        = $realtime;
    edge_t[wr] = now;
    edge_v[wr] = osc;
    wr         = (wr + 1) % HIST;
    if (osc) begin
      m = sel64 ? 64.0 : 128.0;
      if (have_rise && (now - last_rise) < 2.0 * m * cell_delay(vcal, VCTRL_MIN)) begin
        // uA * ns / pF = mV
        err_ns = last_rise + m * cell_delay(vcal, vctrl) - now;
        vctrl  = vctrl + 1.0e-3 * ICP_UA * err_ns / CDLL_PF;
        if (vctrl < VCTRL_MIN) vctrl = VCTRL_MIN;
        if (vctrl > VCTRL_MAX) vctrl = VCTRL_MAX;
      end
      last_rise = now;
      have_rise = 1'b1;
    end
  end

  always @(posedge stop) begin
    real             now, tau;
    logic [TAPS-1:0] snap;
    now = $realtime;
    tau = cell_delay(vcal, vctrl);
    for (int k = 0; k < int'(TAPS); k++)
      snap[k] = level_at(now - real'(k) * tau);
    q <= snap;
  end

endmodule
