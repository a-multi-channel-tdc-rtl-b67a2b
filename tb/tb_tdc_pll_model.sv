// tb_tdc_pll_model -- the model with its default (PLL_0) settings driven by an
// 80 MHz clock: `locked` must rise on the 8th input edge, the outputs must then
// run at 210 MHz and 420 MHz (periods 4761.9 and 2381.0 ps, within 1 ps) with
// coinciding rising edges, and stay low before lock.
`timescale 1ps / 1fs
module tb_tdc_pll_model;
  logic clk_in = 0, rst = 0, locked;
  logic [1:0] clk_out;
  int checks = 0, failures = 0, in_edges = 0, early = 0;
  realtime r0 [$], r1 [$];

  tdc_pll_model dut (.clk_in(clk_in), .rst(rst), .clk_out(clk_out), .locked(locked));

  always #6250 clk_in = ~clk_in;
  always @(posedge clk_in) in_edges++;
  always @(posedge clk_out[0]) begin r0.push_back($realtime); if (!locked) early++; end
  always @(posedge clk_out[1]) begin r1.push_back($realtime); if (!locked) early++; end

  task automatic check_near(string what, real got, real exp_v);
    checks++;
    if (got < exp_v - 1.0 || got > exp_v + 1.0) begin
      failures++; $display("%s: %f expected %f", what, got, exp_v);
    end
  endtask

  initial begin
    @(posedge locked);
    checks++;
    if (in_edges != 8) begin failures++; $display("locked after %0d edges", in_edges); end
    #200_000;
    checks++;
    if (early != 0 || r0.size() < 40 || r1.size() < 80) begin failures++; $display("edge counts %0d %0d", r0.size(), r1.size()); end
    for (int i = 1; i < 40; i++) check_near("210 MHz period", r0[i] - r0[i-1], 4761.904762);
    for (int i = 1; i < 80; i++) check_near("420 MHz period", r1[i] - r1[i-1], 2380.952381);
    for (int i = 0; i < 40; i++) check_near("edge alignment", r0[i], r1[2*i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
