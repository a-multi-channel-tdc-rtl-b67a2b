// tdc_sampling_ffs -- the sixteen sampling flip-flops of one TDC channel.
//
// The channel input (the discriminated photon signal) is sampled by sixteen
// flip-flops, each clocked at a different instant of the 420 MHz period. Flip-flop
// k (k = 0..7) samples on the rising edge of clk_ph[k]; flip-flop k+8 samples on
// the falling edge of clk_ph[k]. With clk_ph[k] shifted by k*22.5 degrees, sample k
// is taken k/16 of a period (k * 148.8 ps) after the 0-degree rising edge, so the
// sixteen bits form a snapshot of the input with ~150 ps bins: a run of ones marks
// the time the signal was over threshold (leading edge = time of arrival, run
// length = time over threshold).
//
// Sampling on both edges of eight clocks, rather than on sixteen separate clocks,
// is how this design reads "16 phase-shifted copies" together with the eight
// clocks the document's clock diagram shows. In the FPGA these flip-flops are
// placed by hand and the input is fanned out with equalised delays; that placement
// has no RTL equivalent.
//
// Ports: clk_ph[7:0], hit_in (asynchronous), smp[15:0] (smp[k] = sample at k/16
// of the period, each bit in its own clock domain). No reset: every bit is
// rewritten each 420 MHz period.
`timescale 1ps / 1fs
module tdc_sampling_ffs (
  input  logic [7:0]  clk_ph,
  input  logic        hit_in,
  output logic [15:0] smp
);

  for (genvar k = 0; k < 8; k++) begin : g_ph
    logic s_rise, s_fall;  // one flip-flop per clock edge
    always_ff @(posedge clk_ph[k]) s_rise <= hit_in;
    always_ff @(negedge clk_ph[k]) s_fall <= hit_in;
    assign smp[k]     = s_rise;
    assign smp[k + 8] = s_fall;
  end

endmodule
