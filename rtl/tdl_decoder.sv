// tdl_decoder: fine part of the TDC, finds the oscillator phase in the
// latched delay-line word.
//
// tdl[k-1] holds the latch at the input of delay cell k (k = 1..TAPS); the
// latch of cell 1 sees the oscillator itself. At the stop edge the word
// shows the last rising edge of osc as the first place where a run of ones
// is followed by zeros. The decoder returns m, the 1-based position of the
// last one of that run, so the rising edge has passed m-1 cells but not m.
//
// The search correlates the word with a mask of MASK_W ones followed by
// MASK_W zeros. A candidate transition between positions i-1 and i (0-based
// bit indices) needs tdl[i-1] = 1 and tdl[i] = 0 exactly, and at most
// MAX_ERR mismatching bits in the rest of the mask window; windows are
// clipped to the active length of the line (TAPS in 128-cell mode, TAPS/2
// in 64-cell mode, i.e. 144 or 72 taps). The lowest such candidate wins.
// Isolated bubbles inside a run of ones or zeros are thus rejected, and a
// transition beyond M (positive delay offset) is still found in the extra
// taps. If no candidate qualifies, out is 0. Within the first MASK_W taps
// the ones part of the mask is cut off by the start of the line, so a bubble
// there cannot be told from a rising edge that has only just arrived.
//
// Timing: start (one cycle) captures tdl; candidates are formed in the next
// cycle and priority-encoded in the one after; done pulses for one cycle
// with out valid 3 clk cycles after start. out is held until the next
// result. The mask width, error tolerance and pipeline are this design's
// choices; the published decoder is described only as a correlation with a
// ones/zeros mask that tolerates spurious errors and delay offset.
`timescale 1ns/1ps
module tdl_decoder #(
  parameter int unsigned TAPS    = accel_pkg::TDL_TAPS,
  parameter int unsigned OUT_W   = accel_pkg::DEC_W,
  parameter int unsigned MASK_W  = 8,
  parameter int unsigned MAX_ERR = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             size,    // 1: 64-cell mode, 0: 128-cell mode
  input  logic [TAPS-1:0]  tdl,
  output logic             done,
  output logic [OUT_W-1:0] out
);

  logic [TAPS-1:0] q_r;
  logic            size_r;
  logic [TAPS-1:0] hit, hit_r;
  logic [1:0]      vld;

  // Candidate transitions: hit[i] means "ones end at i-1, zeros start at i".
  always_comb begin
    int unsigned len;
    int unsigned errs;
    len = size_r ? TAPS / 2 : TAPS;
    hit = '0;
    for (int i = 1; i < int'(TAPS); i++) begin
      errs = 0;
      for (int j = 2; j <= int'(MASK_W); j++)
        if (i - j >= 0 && q_r[i-j] == 1'b0) errs++;
      for (int j = 1; j < int'(MASK_W); j++)
        if (i + j < int'(len) && q_r[i+j] == 1'b1) errs++;
      if (i < int'(len) && q_r[i-1] && !q_r[i] && errs <= MAX_ERR)
        hit[i] = 1'b1;
    end
  end

  // Lowest hit wins; its bit index equals the 1-based position of the last one.
  logic [OUT_W-1:0] first;
  always_comb begin
    first = '0;
    for (int i = int'(TAPS) - 1; i >= 1; i--)
      if (hit_r[i]) first = OUT_W'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r    <= '0;
      size_r <= 1'b0;
      hit_r  <= '0;
      vld    <= '0;
      done   <= 1'b0;
      out    <= '0;
    end else begin
      if (start) begin
        q_r    <= tdl;
        size_r <= size;
      end
      hit_r <= hit;
      vld   <= {vld[0], start};
      done  <= vld[1];
      if (vld[1])
        out <= first;
    end
  end

endmodule
