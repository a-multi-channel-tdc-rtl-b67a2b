// tdc_daq -- the data-acquisition system inside the FPGA: buffers the hits of all
// TDC channels and, in response to a trigger, sends the zero-suppressed hits of a
// time window around it to the USB link.
//
// Path: per-channel hits -> tdc_hit_merger (one stream, round-robin) ->
// tdc_trigger_matcher (window selection, event framing) -> event buffer
// (tdc_fifo, EVT_DEPTH 64-bit words) -> tdc_usb_tx (bytes to the USB bridge).
// The trigger is either the leading edge seen by the trigger channel TRIG_CH
// (trig_sel = 0, normal data taking) or the internal calibration trigger from
// tdc_cal_pulser (trig_sel = 1, calibration with an external pulse generator).
// The trigger channel never enters the data stream; its time is in the event
// header. When the USB side is slow the event buffer fills, the matcher stalls
// and hits wait in the merger queues; beyond those, hits are dropped and counted.
//
// The document states that the DAQ buffers data, zero-suppresses it and sends it
// over USB on an external trigger; its structure and sizes are this design's.
//
// Ports: clk (210 MHz), rst, coarse, hit_valid[N]/hits[N] from the core, trig_sel,
// cal_enable, cal_period, trig_out (calibration trigger pad), USB byte port,
// status: n_events, n_hits_dropped, n_trig_dropped, evt_fill (buffer level).
`timescale 1ps / 1fs
module tdc_daq
  import tdc_pkg::*;
#(
  parameter int unsigned N         = N_CH,
  parameter int unsigned TRIG      = TRIG_CH,
  parameter int unsigned CH_DEPTH  = 4,
  parameter int unsigned EVT_DEPTH = 1024,
  parameter int unsigned WIN_PRE   = 100,
  parameter int unsigned WIN_POST  = 100,
  parameter int unsigned LATENCY   = 1024,
  parameter int unsigned CAL_WIDTH = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [COARSE_W-1:0]       coarse,
  input  logic [N-1:0]              hit_valid,
  input  hit_t                      hits [N],
  input  logic                      trig_sel,
  input  logic                      cal_enable,
  input  logic [15:0]               cal_period,
  output logic                      trig_out,
  input  logic                      usb_txe_n,
  output logic                      usb_wr_n,
  output logic [7:0]                usb_data,
  output logic [EVT_W-1:0]          n_events,
  output logic [15:0]               n_hits_dropped,
  output logic [15:0]               n_trig_dropped,
  output logic [$clog2(EVT_DEPTH):0] evt_fill
);

  // ---- merge data channels (trigger channel excluded)
  logic [N-1:0] data_en;
  always_comb begin
    data_en       = '1;
    data_en[TRIG] = 1'b0;
  end

  logic m_valid, m_ready, m_ovf_unused;
  hit_t m_hit;

  tdc_hit_merger #(.N(N), .CH_DEPTH(CH_DEPTH)) u_merge (
    .clk(clk), .rst(rst), .ch_enable(data_en), .in_valid(hit_valid), .in_hit(hits),
    .out_valid(m_valid), .out_hit(m_hit), .out_ready(m_ready),
    .overflow(m_ovf_unused), .n_dropped(n_hits_dropped)
  );

  // ---- trigger source
  logic      cal_valid;
  tdc_time_t cal_time;

  tdc_cal_pulser #(.WIDTH(CAL_WIDTH)) u_cal (
    .clk(clk), .rst(rst), .enable(cal_enable), .period(cal_period), .coarse(coarse),
    .trig_out(trig_out), .cal_valid(cal_valid), .cal_time(cal_time)
  );

  logic      t_valid;
  tdc_time_t t_time;
  assign t_valid = trig_sel ? cal_valid : hit_valid[TRIG];
  assign t_time  = trig_sel ? cal_time  : hits[TRIG].toa;

  // ---- event building
  logic        e_valid, e_ready, busy_unused;
  logic [63:0] e_word;

  tdc_trigger_matcher #(.WIN_PRE(WIN_PRE), .WIN_POST(WIN_POST), .LATENCY(LATENCY)) u_match (
    .clk(clk), .rst(rst), .coarse(coarse),
    .hit_valid(m_valid), .hit(m_hit), .hit_ready(m_ready),
    .trig_valid(t_valid), .trig_time(t_time),
    .out_valid(e_valid), .out_word(e_word), .out_ready(e_ready),
    .n_events(n_events), .n_trig_dropped(n_trig_dropped), .busy(busy_unused)
  );

  // ---- event buffer
  logic        b_full, b_empty, b_rd;
  logic [63:0] b_word;
  assign e_ready = !b_full;

  tdc_fifo #(.WIDTH(64), .DEPTH(EVT_DEPTH)) u_evbuf (
    .clk(clk), .rst(rst),
    .wr_en(e_valid && !b_full), .wr_data(e_word), .full(b_full),
    .rd_en(b_rd), .rd_data(b_word), .empty(b_empty), .count(evt_fill)
  );

  // ---- USB
  logic u_ready;
  assign b_rd = u_ready && !b_empty;

  tdc_usb_tx u_usb (
    .clk(clk), .rst(rst), .in_valid(!b_empty), .in_word(b_word), .in_ready(u_ready),
    .usb_txe_n(usb_txe_n), .usb_wr_n(usb_wr_n), .usb_data(usb_data)
  );

endmodule
