// tdc_trigger_matcher -- the event builder of the DAQ: buffers the hits of all
// channels and keeps only those that fall in a time window around a trigger,
// framed as events.
//
// Data are read out "in response to an external trigger" and zero-suppressed:
// only channels that saw a pulse produce a word. The trigger time is the
// leading-edge timestamp measured by the trigger channel (or the time of the
// internal calibration trigger). A hit at time h belongs to the trigger at time T
// if  T - WIN_PRE <= h <= T + WIN_POST  (all in 148.8 ps bins).
//
// Hits do not arrive in time order: a channel reports a pulse at its falling
// edge, up to TOT_MAX bins after its leading edge, and the merger interleaves the
// channels. They also arrive before the trigger that selects them. So hits wait
// in the hit buffer (HIT_DEPTH entries) and the buffer head is only judged once
// the current time is LATENCY bins past its leading edge ("released"); by then
// any trigger that could select it has been queued. LATENCY must exceed WIN_PRE
// plus the reporting delay of the trigger channel, and also the age a hit can
// have when it gets here: the channel pipeline (about 8 cycles, 256 bins), the
// pulse length (up to TOT_MAX bins) and the wait in the merger. A hit arriving
// older than that may miss an event that has already closed.
//
// With no event open, the oldest queued trigger opens one: a header word (event
// number, trigger time) is sent; released hits are dropped while no event is
// open. With an event open, the head hit is
//   released and too early    -> dropped;
//   released and in the window -> sent as a hit word;
//   otherwise (not released yet, or after the window) -> written back at the
//   tail of the buffer, so it cannot hold up hits of the window queued behind it.
//   The buffer has one write port and a new hit has priority: in a cycle where
//   the merger offers a hit the buffer can take, such a head simply waits. A
//   full buffer takes the written-back head in the same cycle it is read.
// Once the time is past T + WIN_POST + LATENCY no hit of the window can still
// arrive; the matcher then makes one more pass over the hits in the buffer and
// closes the event with a trailer word (event number, hit count). A hit lying in
// two overlapping windows is sent with the first event only. Triggers beyond the
// trigger queue's TRIG_DEPTH are dropped and counted; hits beyond the buffer wait
// in the merger. Everything stalls while the output is not ready.
//
// The document names triggered, zero-suppressed readout through a buffer; the
// window rule, the word formats (tdc_pkg), the recirculating buffer and the
// defaults are this design's own. Timestamps wrap: all comparisons are on signed
// modular differences.
//
// Ports: clk, rst, coarse (current 210 MHz cycle count), hit stream in
// (hit_valid/hit/hit_ready), trigger in (trig_valid, trig_time), word stream out
// (out_valid/out_word/out_ready), n_events, n_trig_dropped, busy (event open).
`timescale 1ps / 1fs
module tdc_trigger_matcher
  import tdc_pkg::*;
#(
  parameter int unsigned WIN_PRE    = 100,   // bins before the trigger (14.9 ns)
  parameter int unsigned WIN_POST   = 100,   // bins after the trigger
  parameter int unsigned LATENCY    = 1024,  // bins a hit is held (152 ns)
  parameter int unsigned TRIG_DEPTH = 4,
  parameter int unsigned HIT_DEPTH  = 256
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [COARSE_W-1:0] coarse,
  input  logic                hit_valid,
  input  hit_t                hit,
  output logic                hit_ready,
  input  logic                trig_valid,
  input  tdc_time_t           trig_time,
  output logic                out_valid,
  output logic [63:0]         out_word,
  input  logic                out_ready,
  output logic [EVT_W-1:0]    n_events,
  output logic [15:0]         n_trig_dropped,
  output logic                busy
);

  typedef enum logic [0:0] {S_IDLE, S_OPEN} state_e;
  state_e state;

  // ---- trigger queue
  logic      tq_full, tq_empty, tq_rd;
  tdc_time_t tq_time;
  logic [$clog2(TRIG_DEPTH):0] tq_count_unused;

  tdc_fifo #(.WIDTH(TIME_W), .DEPTH(TRIG_DEPTH)) u_trig_q (
    .clk(clk), .rst(rst),
    .wr_en(trig_valid && !tq_full), .wr_data(trig_time), .full(tq_full),
    .rd_en(tq_rd), .rd_data(tq_time), .empty(tq_empty), .count(tq_count_unused)
  );

  // ---- hit buffer
  logic                       hb_full, hb_empty, hb_wr, hb_rd, recirc;
  hit_t                       hb_head, hb_in;
  logic [$clog2(HIT_DEPTH):0] hb_count;

  assign hit_ready = !recirc && !hb_full;
  assign hb_wr     = recirc || (hit_valid && !hb_full);
  assign hb_in     = recirc ? hb_head : hit;

  tdc_fifo #(.WIDTH(HIT_W), .DEPTH(HIT_DEPTH)) u_hit_buf (
    .clk(clk), .rst(rst),
    .wr_en(hb_wr), .wr_data(hb_in), .full(hb_full),
    .rd_en(hb_rd), .rd_data(hb_head), .empty(hb_empty), .count(hb_count)
  );

  tdc_time_t                  now, t_open;
  logic [15:0]                n_hits;
  logic                       sweeping;   // final pass over the buffer running
  logic [$clog2(HIT_DEPTH):0] sweep_left;
  logic signed [TIME_W-1:0]   age, d_hit, d_open;
  logic                       released, too_early, in_window, late, can_out;

  always_comb begin
    now       = {coarse, FINE_W'(0)};
    age       = $signed(now - hb_head.toa);
    d_hit     = $signed(hb_head.toa - t_open);
    d_open    = $signed(now - t_open);
    released  = !hb_empty && (age >= $signed(TIME_W'(LATENCY)));
    too_early = d_hit < -$signed(TIME_W'(WIN_PRE));
    in_window = !too_early && (d_hit <= $signed(TIME_W'(WIN_POST)));
    late      = d_open > $signed(TIME_W'(WIN_POST + LATENCY));
    can_out   = !out_valid || out_ready;
  end

  // ---- decisions of this cycle
  logic          send, close_evt;
  logic [63:0]   word;
  header_word_t  hw;
  hit_word_t     dw;
  trailer_word_t tw;

  always_comb begin
    hw = '{wtype: WT_HEADER, evt_no: n_events, rsvd: '0, trig_time: tq_time};
    dw = '{wtype: WT_HIT, rsvd: '0, ch: hb_head.ch, tot_ovf: hb_head.tot_ovf,
           tot: hb_head.tot, rsvd2: '0, toa: hb_head.toa};
    tw = '{wtype: WT_TRAILER, evt_no: n_events, n_hits: n_hits, rsvd: '0};
    send      = 1'b0;
    close_evt = 1'b0;
    word      = 64'(dw);
    hb_rd     = 1'b0;
    recirc    = 1'b0;
    tq_rd     = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (!tq_empty) begin
          if (can_out) begin
            send  = 1'b1;
            word  = 64'(hw);
            tq_rd = 1'b1;
          end
        end else if (released) begin
          hb_rd = 1'b1;        // no trigger wants it: zero suppression
        end
      end
      S_OPEN: begin
        if (sweeping && (sweep_left == '0 || hb_empty)) begin
          if (can_out) begin
            send      = 1'b1;
            close_evt = 1'b1;
            word      = 64'(tw);
          end
        end else if (!hb_empty) begin
          if (released && too_early) begin
            hb_rd = 1'b1;
          end else if (released && in_window) begin
            if (can_out) begin
              hb_rd = 1'b1;
              send  = 1'b1;
            end
          end else if (!hit_valid || hb_full) begin
            hb_rd  = 1'b1;     // not yet due, or after the window: to the tail
            recirc = 1'b1;     // (only when no new hit can use the write port)
          end
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_IDLE;
      t_open         <= '0;
      n_hits         <= '0;
      n_events       <= '0;
      n_trig_dropped <= '0;
      sweeping       <= 1'b0;
      sweep_left     <= '0;
      out_valid      <= 1'b0;
      out_word       <= '0;
    end else begin
      if (send) begin
        out_valid <= 1'b1;
        out_word  <= word;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
      if (trig_valid && tq_full && n_trig_dropped != '1)
        n_trig_dropped <= n_trig_dropped + 1'b1;
      unique case (state)
        S_IDLE: if (tq_rd) begin
          state    <= S_OPEN;
          t_open   <= tq_time;
          n_hits   <= '0;
          sweeping <= 1'b0;
        end
        S_OPEN: begin
          if (close_evt) begin
            state    <= S_IDLE;
            sweeping <= 1'b0;
            n_events <= n_events + 1'b1;
          end else begin
            if (send) n_hits <= n_hits + 1'b1;
            if (!sweeping && late) begin
              sweeping   <= 1'b1;
              sweep_left <= hb_count;
            end else if (sweeping && hb_rd) begin
              sweep_left <= sweep_left - 1'b1;
            end
          end
        end
        default: ;
      endcase
    end
  end

  assign busy = (state == S_OPEN);

  // handshake rule: a word once offered stays until taken
  a_out_hold: assert property (@(posedge clk) disable iff (rst)
                               out_valid && !out_ready |=> out_valid && $stable(out_word));

  // the readout words must fill exactly 64 bits
  if ($bits(header_word_t) != 64 || $bits(hit_word_t) != 64 || $bits(trailer_word_t) != 64) begin : g_bad
    $error("readout word layout is not 64 bits");
  end

endmodule
