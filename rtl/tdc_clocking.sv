// tdc_clocking -- BEHAVIOURAL MODEL of the TDC clocking network: the clock-capable
// input pin (MRCC) and three PLLs.
//
// The 80 MHz board clock enters through a clock-capable pin (a plain buffer here)
// and drives PLL_0, which makes the 210 MHz system clock and the 420 MHz 0-degree
// sampling clock. That 420 MHz clock is the reference of PLL_1, which makes six
// copies shifted by 22.5, 45, 67.5, 90, 112.5 and 135 degrees, and of PLL_2, which
// makes the 157.5-degree copy. The eight 420 MHz clocks, used on both their rising
// and falling edges, give sixteen sampling instants 22.5 degrees (148.8 ps) apart.
// Frequencies, phases and the PLL split follow the document's clock diagram; the
// lock behaviour is that of tdc_pll_model.
//
// Ports: clk80_in (80 MHz board clock), rst, clk210, clk_ph[7:0] (clk_ph[k] = 420 MHz at
// k*22.5 degrees, clk_ph[0] is the 0-degree clock), locked (all three PLLs).
`timescale 1ps / 1fs
module tdc_clocking #(
  parameter real T420_PS         = 2380.952381    // 420 MHz
) (
  input  logic       clk80_in,
  input  logic       rst,
  output logic       clk210,
  output logic [7:0] clk_ph,
  output logic       locked
);

  logic       mrcc_clk;
  logic [1:0] pll0_out;
  logic [5:0] pll1_out;
  logic [0:0] pll2_out;
  logic       lock0, lock1, lock2;

  // clock-capable input buffer
  assign mrcc_clk = clk80_in;

  tdc_pll_model #(
    .N_OUT(2),
    .OUT_PERIOD_PS('{2.0 * T420_PS, T420_PS, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0}),
    .OUT_PHASE_DEG('{0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0})
  ) u_pll_0 (
    .clk_in(mrcc_clk), .rst(rst), .clk_out(pll0_out), .locked(lock0)
  );

  tdc_pll_model #(
    .N_OUT(6),
    .OUT_PERIOD_PS('{T420_PS, T420_PS, T420_PS, T420_PS, T420_PS, T420_PS, 0.0, 0.0}),
    .OUT_PHASE_DEG('{22.5, 45.0, 67.5, 90.0, 112.5, 135.0, 0.0, 0.0})
  ) u_pll_1 (
    .clk_in(pll0_out[1]), .rst(!lock0), .clk_out(pll1_out), .locked(lock1)
  );

  tdc_pll_model #(
    .N_OUT(1),
    .OUT_PERIOD_PS('{T420_PS, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0}),
    .OUT_PHASE_DEG('{157.5, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0})
  ) u_pll_2 (
    .clk_in(pll0_out[1]), .rst(!lock0), .clk_out(pll2_out), .locked(lock2)
  );

  assign clk210 = pll0_out[0];
  assign clk_ph = {pll2_out[0], pll1_out, pll0_out[1]};
  assign locked = lock0 & lock1 & lock2;

endmodule
