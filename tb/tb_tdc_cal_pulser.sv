// tb_tdc_cal_pulser -- with period 20 and WIDTH 8: trig_out must be high for 8 of
// every 20 cycles, cal_valid must pulse once per period, in the cycle in which
// trig_out rises, with cal_time = {coarse at the rise, 0}. Disabled, nothing moves.
`timescale 1ps / 1fs
module tb_tdc_cal_pulser;
  import tdc_pkg::*;
  logic clk = 0, rst, enable, trig_out, cal_valid;
  logic [15:0] period;
  logic [COARSE_W-1:0] coarse;
  tdc_time_t cal_time, pending;
  logic pend = 0;
  int checks = 0, failures = 0, highs = 0, pulses = 0, rises = 0;
  logic trig_q = 0;

  tdc_cal_pulser #(.WIDTH(8)) dut (.*);
  always #500 clk = ~clk;
  always @(posedge clk) coarse <= rst ? '0 : coarse + 1'b1;

  always @(negedge clk) if (!rst) begin
    if (trig_out) highs++;
    if (cal_valid) begin pulses++; pending = cal_time; pend = 1; end
    if (trig_out && !trig_q) begin
      rises++;
      checks++;
      if (!pend || pending !== {coarse, 5'd0}) begin
        failures++; $display("rise at coarse %0d, cal_time %0d pend %b", coarse, pending, pend);
      end
      pend = 0;
    end
    trig_q = trig_out;
  end

  initial begin
    rst = 1; enable = 0; period = 16'd20; coarse = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (50) @(posedge clk);
    checks++;
    if (highs != 0 || pulses != 0) begin failures++; $display("active while disabled"); end
    @(negedge clk); enable = 1;
    repeat (2000) @(posedge clk);
    @(negedge clk); enable = 0;
    checks++;
    if (pulses != 100) begin failures++; $display("pulses %0d", pulses); end
    checks++;
    if (highs < 799 || highs > 801) begin failures++; $display("high cycles %0d", highs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
