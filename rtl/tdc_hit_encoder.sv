// tdc_hit_encoder -- turns the sampled bit pattern of one channel into hits:
// time of arrival (ToA, leading edge) and time over threshold (ToT, trailing minus
// leading edge), both in 148.8 ps bins.
//
// Each 210 MHz cycle brings a 32-bit word, bit i being the input level i bins into
// the cycle. Together with the last bit of the previous word it gives rising-edge
// (0 -> 1) and falling-edge (1 -> 0) positions. A timestamp is {coarse, i}, where
// `coarse` counts 210 MHz cycles. The encoder remembers whether the input is high
// and, if so, the leading-edge time of the open pulse. A pulse is reported on the
// cycle that holds its falling edge: ToA = leading edge, ToT = fall - rise. If the
// input ends a word high, the last rising edge of the word opens the next pulse,
// so a new pulse may start in the same cycle as the previous one ends.
//
// At most one pulse is reported per word. A second pulse that both starts and ends
// inside the same 32-bin word after another pulse has ended there is not reported
// (with the document's 50 MHz photon rate the mean spacing is more than four words).
// A pulse still high TOT_MAX bins after its leading edge is reported at once with
// tot = TOT_MAX and tot_ovf set, and its eventual fall is ignored; so is a fall
// whose rise came before reset. The document shows that ToA and ToT are taken from
// the same sampled pattern; the encoding, the one-pulse-per-word rule and the
// overflow rule are this design's own.
//
// Ports: clk (210 MHz), rst (synchronous, active high), word[31:0] from
// tdc_sync_logic, coarse (shared 210 MHz cycle counter), hit_valid / hit (one
// cycle pulse, registered: one cycle after the word).
`timescale 1ps / 1fs
module tdc_hit_encoder
  import tdc_pkg::*;
#(
  parameter logic [CH_W-1:0]  CH      = '0,              // channel number put in hits
  parameter int unsigned      TOT_MAX = (1 << TOT_W) - 1 // bins
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [WORD_W-1:0]   word,
  input  logic [COARSE_W-1:0] coarse,
  output logic                hit_valid,
  output hit_t                hit
);

  logic            prev;        // input level at the end of the previous word
  logic            lead_valid;  // an open pulse has a known leading edge
  tdc_time_t       lead;

  logic [WORD_W-1:0] rise, fall;
  logic              any_rise, any_fall;
  logic [FINE_W-1:0] r_first, r_last, f_first;

  always_comb begin
    rise = word & ~{word[WORD_W-2:0], prev};
    fall = ~word & {word[WORD_W-2:0], prev};
    any_rise = |rise;
    any_fall = |fall;
    r_first = '0;
    f_first = '0;
    r_last  = '0;
    for (int i = WORD_W - 1; i >= 0; i--) begin
      if (rise[i]) r_first = FINE_W'(i);
      if (fall[i]) f_first = FINE_W'(i);
    end
    for (int i = 0; i < WORD_W; i++) begin
      if (rise[i]) r_last = FINE_W'(i);
    end
  end

  tdc_time_t t_fall, t_rfirst, t_rlast, t_end, start, width;
  logic      emit;

  always_comb begin
    t_fall   = {coarse, f_first};
    t_rfirst = {coarse, r_first};
    t_rlast  = {coarse, r_last};
    t_end    = {coarse, FINE_W'(WORD_W - 1)};
    emit     = 1'b0;
    start    = lead;
    width    = '0;
    if (any_fall) begin
      if (prev && lead_valid) begin
        emit  = 1'b1;
        start = lead;
      end else if (!prev && any_rise) begin
        emit  = 1'b1;
        start = t_rfirst;
      end
      width = t_fall - start;
    end else if (prev && lead_valid && (t_end - lead >= TIME_W'(TOT_MAX))) begin
      emit  = 1'b1;           // still high: report with saturated ToT
      start = lead;
      width = TIME_W'(TOT_MAX);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev       <= 1'b0;
      lead_valid <= 1'b0;
      lead       <= '0;
      hit_valid  <= 1'b0;
      hit        <= '0;
    end else begin
      prev      <= word[WORD_W-1];
      hit_valid <= emit;
      if (emit) begin
        hit.ch      <= CH;
        hit.toa     <= start;
        hit.tot_ovf <= (width >= TIME_W'(TOT_MAX));
        hit.tot     <= (width >= TIME_W'(TOT_MAX)) ? TOT_W'(TOT_MAX) : width[TOT_W-1:0];
      end
      if (word[WORD_W-1]) begin
        if (any_rise) begin
          lead       <= t_rlast;
          lead_valid <= 1'b1;
        end else if (emit) begin
          lead_valid <= 1'b0;  // overflow reported: wait for the fall
        end
      end else begin
        lead_valid <= 1'b0;
      end
    end
  end

endmodule
