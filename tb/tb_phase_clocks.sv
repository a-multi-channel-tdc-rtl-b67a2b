// tb_phase_clocks -- testbench clock source: eight 420 MHz clocks k*22.5 degrees
// apart (clk_ph[k] rises k*T/16 after clk_ph[0]) and a 210 MHz clock whose rising
// edges coincide with every second rising edge of clk_ph[0]. All start at time 0
// (clk_ph[0] and clk210 rise at t = 0). Used by the channel-level testbenches
// in place of the PLL model so that edge times are known exactly.
`timescale 1ps / 1fs
module tb_phase_clocks #(
  parameter real T_PS = 2380.952381
) (
  output logic [7:0] clk_ph,
  output logic       clk210
);
  for (genvar k = 0; k < 8; k++) begin : g_ph
    initial begin
      clk_ph[k] = 1'b0;
      if (k > 0) #(T_PS * k / 16.0);
      forever begin
        clk_ph[k] = 1'b1;
        #(T_PS / 2.0);
        clk_ph[k] = 1'b0;
        #(T_PS / 2.0);
      end
    end
  end
  initial begin
    clk210 = 1'b0;
    forever begin
      clk210 = 1'b1;
      #(T_PS);
      clk210 = 1'b0;
      #(T_PS);
    end
  end
endmodule
