// tdc_sync_logic -- brings the sixteen phase samples of one channel into a single
// clock domain and packs two 420 MHz periods into one 32-bit word at 210 MHz.
//
// The document requires the sampled pattern to be "clocked and synchronised
// correctly in one clock domain before readout"; how is this design's own choice,
// chosen so that every flip-flop-to-flip-flop path gets at least half a 420 MHz
// period (1.19 ns):
//   * samples 0..7 (rising edges of clk_ph[k], taken at k/16 of period n) are
//     captured by the 0-degree clock at the start of period n+1 and delayed one
//     more 0-degree cycle;
//   * samples 8..15 (falling edges of clk_ph[k-8]) are first re-registered on the
//     next rising edge of the same clock, half a period later, then captured by
//     the 0-degree clock at the start of period n+2.
// After these stages the 16-bit word w420 holds all samples of one period n, bit k
// being the sample at k/16. A 2:1 gearbox then joins two such words into the
// 32-bit word `word` on the rising edge of clk210 (which coincides with every
// second rising edge of clk_ph[0]): word[15:0] is the earlier period, word[31:16]
// the later one, so word[i] is the input level i bins after the start of the
// 210 MHz period it covers.
//
// Latency from the sampling instant to `word`: 3 to 4 periods of 420 MHz.
// Ports: clk_ph[7:0], clk210, smp[15:0] from tdc_sampling_ffs, word[31:0].
// No reset: the pipeline is rewritten every cycle.
`timescale 1ps / 1fs
module tdc_sync_logic (
  input  logic [7:0]  clk_ph,
  input  logic        clk210,
  input  logic [15:0] smp,
  output logic [31:0] word
);

  logic [15:0] w420;       // one 420 MHz period, all bits in the clk_ph[0] domain
  logic [15:0] w420_prev;  // the period before

  for (genvar k = 0; k < 8; k++) begin : g_ph
    logic early_q, early_qq;  // sample k (rising edge of clk_ph[k])
    logic late_h, late_q;     // sample k+8 (falling edge of clk_ph[k])

    always_ff @(posedge clk_ph[0]) begin
      early_q  <= smp[k];
      early_qq <= early_q;
    end

    always_ff @(posedge clk_ph[k]) late_h <= smp[k + 8];
    always_ff @(posedge clk_ph[0]) late_q <= late_h;

    assign w420[k]     = early_qq;
    assign w420[k + 8] = late_q;
  end

  always_ff @(posedge clk_ph[0]) w420_prev <= w420;

  always_ff @(posedge clk210) word <= {w420, w420_prev};

endmodule
