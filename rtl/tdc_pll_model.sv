// tdc_pll_model -- BEHAVIOURAL MODEL (not synthesizable) of one FPGA PLL as used in
// the TDC clocking network (PLL_0, PLL_1 and PLL_2 are instances of it).
//
// A real PLL is an analog macro of the FPGA; this model reproduces only what the
// logic sees. It counts LOCK_CYCLES rising edges of clk_in, then raises `locked`
// and starts every output at that same edge plus its phase delay. Output i runs
// with period OUT_PERIOD_PS[i] and phase OUT_PHASE_DEG[i] (degrees of its own
// period). Because every output of every instance starts from a reference edge and
// the periods are exact fractions of the 420 MHz period, the outputs stay
// phase-aligned with one another for the whole simulation; jitter is not modelled.
//
// Ports: clk_in (reference), rst (holds the model unlocked), clk_out[N_OUT], locked.
// The defaults describe PLL_0 of the design: 80 MHz in, 210 MHz and 420 MHz at 0
// degrees out. The lock count is this model's choice.
`timescale 1ps / 1fs
module tdc_pll_model #(
  parameter int unsigned N_OUT          = 2,
  // entries beyond N_OUT are ignored (at most 8 outputs)
  parameter real         OUT_PERIOD_PS [8] = '{4761.904762, 2380.952381, 0.0, 0.0,
                                               0.0, 0.0, 0.0, 0.0},
  parameter real         OUT_PHASE_DEG [8] = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0},
  parameter int unsigned LOCK_CYCLES    = 8
) (
  input  logic             clk_in,
  input  logic             rst,
  output logic [N_OUT-1:0] clk_out,
  output logic             locked
);

  int unsigned n_edges;

  initial begin
    locked  = 1'b0;
    n_edges = 0;
  end

  always @(posedge clk_in or posedge rst) begin
    if (rst) begin
      n_edges <= 0;
    end else if (!locked) begin
      if (n_edges + 1 >= LOCK_CYCLES) locked <= 1'b1;
      n_edges <= n_edges + 1;
    end
  end

  for (genvar i = 0; i < N_OUT; i++) begin : g_out
    localparam real HALF_PS  = OUT_PERIOD_PS[i] / 2.0;
    localparam real DELAY_PS = OUT_PERIOD_PS[i] * OUT_PHASE_DEG[i] / 360.0;
    logic run;   // output started: lock edge plus phase delay has passed

    initial begin
      run        = 1'b0;
      clk_out[i] = 1'b0;
      @(posedge locked);
      if (DELAY_PS > 0.0) #(DELAY_PS);
      run = 1'b1;
    end

    always begin
      wait (run);
      clk_out[i] = 1'b1;
      #(HALF_PS);
      clk_out[i] = 1'b0;
      #(HALF_PS);
    end
  end

endmodule
