// tb_sense_drive_seq: checks the frame timing of the sense/drive sequencer
// with short slots (SENSE_CYC = 50, DRIVE_CYC = 40, RST_CYC = 5): the
// length of every reset, sense and drive phase, the order of the phases,
// rst/stop levels in each phase, one drive_start per frame on the first
// drive cycle, and parking in reset while en is low.
`timescale 1ns/1ps
module tb_sense_drive_seq;
  import accel_pkg::*;
  localparam int S = 50, D = 40, R = 5;
  logic      clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  osc_mode_e mode;
  logic      rst, stop, drive_start;
  int        checks = 0, failures = 0;

  sense_drive_seq #(.SENSE_CYC(S), .DRIVE_CYC(D), .RST_CYC(R)) dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    osc_mode_e prev;
    int run_len, frames, ds;
    #12 rst_n = 1'b1;
    repeat (30) @(posedge clk);
    #0.1 expect_true(mode == MODE_RESET && rst && stop, "parked in reset while en low");
    en = 1'b1;
    @(posedge clk); #0.1;
    prev = mode; run_len = 1; frames = 0; ds = 0;
    while (frames < 12) begin
      @(posedge clk); #0.1;
      if (drive_start) begin
        ds++;
        expect_true(mode == MODE_DRIVE && run_len == S && prev == MODE_SENSE, "drive_start on first drive cycle");
      end
      expect_true(rst == (mode == MODE_RESET) && stop == (mode != MODE_SENSE), "rst/stop levels");
      if (mode == prev) run_len++;
      else begin
        case (prev)
          MODE_SENSE: expect_true(run_len == S && mode == MODE_DRIVE, "sense slot length and successor");
          MODE_DRIVE: expect_true(run_len == D - R && mode == MODE_RESET, "drive length and successor");
          default: begin
            if (frames > 0) expect_true(run_len == R, "reset length");
            expect_true(mode == MODE_SENSE, "reset followed by sense");
            frames++;
          end
        endcase
        prev = mode; run_len = 1;
      end
    end
    expect_true(ds == 11 || ds == 12, "one drive_start per frame");
    en = 1'b0;
    @(posedge clk); @(posedge clk); #0.1;
    expect_true(mode == MODE_RESET, "shut down on en low");
    repeat (200) begin @(posedge clk); #0.1; if (mode != MODE_RESET || !rst) begin failures++; break; end end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
