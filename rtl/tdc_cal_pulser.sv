// tdc_cal_pulser -- trigger output for calibrating the TDC.
//
// For calibration the board sends a trigger to an external pulse generator, which
// answers with a reference pulse (< 25 ps jitter) delayed in 10 ps steps; the
// pulse is fed to a channel input. Scanning the delay across a 420 MHz period and
// counting in which bin the pulse lands gives the width of every bin. This block
// makes that trigger: while `enable` is high it raises trig_out for WIDTH cycles
// every `period` cycles of 210 MHz, and reports the time of each rising edge
// (start of the 210 MHz cycle, fine part 0) on cal_valid/cal_time so the DAQ can
// use it as the event trigger. The trigger output and the calibration procedure
// follow the document; period, width and the internal trigger are this design's
// choice.
//
// Ports: clk (210 MHz), rst, enable, period (cycles, >= WIDTH + 1), coarse,
// trig_out (to the pad), cal_valid (one cycle, in the first cycle trig_out is
// high), cal_time = {coarse of that cycle, 0}.
`timescale 1ps / 1fs
module tdc_cal_pulser
  import tdc_pkg::*;
#(
  parameter int unsigned WIDTH = 8      // cycles, 38 ns
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                enable,
  input  logic [15:0]         period,
  input  logic [COARSE_W-1:0] coarse,
  output logic                trig_out,
  output logic                cal_valid,
  output tdc_time_t           cal_time
);

  logic [15:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      cnt       <= '0;
      trig_out  <= 1'b0;
      cal_valid <= 1'b0;
      cal_time  <= '0;
    end else begin
      cal_valid <= 1'b0;
      if (cnt == 16'd0) begin
        trig_out  <= 1'b1;
        cal_valid <= 1'b1;
        cal_time  <= {coarse + 1'b1, FINE_W'(0)};  // trig_out rises at the next edge
      end else if (cnt == 16'(WIDTH)) begin
        trig_out <= 1'b0;
      end
      cnt <= (cnt + 1'b1 >= period) ? 16'd0 : cnt + 1'b1;
    end
  end

endmodule
