// tb_tdc_clocking -- the clocking network from an 80 MHz clock: after `locked`,
// clk_ph[k] must rise k * 148.81 ps (k * 22.5 degrees of 420 MHz) after clk_ph[0],
// every clock must have the 420 MHz period, and clk210 must rise with every second
// rising edge of clk_ph[0]. Times within 1 ps.
`timescale 1ps / 1fs
module tb_tdc_clocking;
  localparam real T = 2380.952381;
  logic clk80 = 0, rst = 1, clk210, locked;
  logic [7:0] clk_ph;
  int checks = 0, failures = 0;
  realtime rk [8][$];
  realtime r210 [$];

  tdc_clocking dut (.clk80_in(clk80), .rst(rst), .clk210(clk210), .clk_ph(clk_ph), .locked(locked));

  always #6250 clk80 = ~clk80;
  for (genvar k = 0; k < 8; k++) begin : g_mon
    always @(posedge clk_ph[k]) if (locked) rk[k].push_back($realtime);
  end
  always @(posedge clk210) if (locked) r210.push_back($realtime);

  task automatic check_near(string what, real got, real exp_v);
    checks++;
    if (got < exp_v - 1.0 || got > exp_v + 1.0) begin
      failures++; if (failures < 20) $display("%s: %f expected %f", what, got, exp_v);
    end
  endtask

  initial begin
    #50_000 rst = 0;
    @(posedge locked);
    #(40 * T);
    for (int k = 0; k < 8; k++) begin
      automatic int j = 0;
      // first edge of clk_ph[k] at or after the first recorded clk_ph[0] edge
      while (rk[k][j] < rk[0][0] - 1.0) j++;
      for (int i = 0; i < 20; i++) begin
        check_near($sformatf("phase %0d", k), rk[k][j + i] - rk[0][i], k * T / 16.0);
        if (i > 0) check_near($sformatf("period %0d", k), rk[k][j + i] - rk[k][j + i - 1], T);
      end
    end
    begin
      automatic int j = 0;
      while (rk[0][j] < r210[0] - 1.0) j++;
      for (int i = 0; i < 10; i++) check_near("clk210 edge", r210[i], rk[0][j + 2 * i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
