// tdc_pkg -- types and constants shared by the multi-phase-clock TDC and its DAQ.
//
// Time is counted in fine bins. One bin is 1/16 of the 420 MHz sampling period
// (2380.95 ps / 16 = 148.8 ps): sixteen clock phases 22.5 degrees apart split each
// 420 MHz period into sixteen bins. The logic after the synchroniser runs at 210 MHz
// and handles two 420 MHz periods, i.e. 32 bins, per cycle, so a timestamp is
// {coarse count of 210 MHz cycles, 5-bit bin index}.
//
// The 34 photon channels, one trigger channel and one spare channel follow the
// document; the field widths, the 64-bit readout word layout and the trigger-window
// defaults are this design's own choices.
`timescale 1ps / 1fs
package tdc_pkg;

  // ---- channel arrangement
  localparam int unsigned N_PHOTON_CH = 34;           // photon channels
  localparam int unsigned N_CH        = N_PHOTON_CH + 2; // plus trigger and spare
  localparam int unsigned TRIG_CH     = 34;           // channel that timestamps the trigger
  localparam int unsigned CH_W        = 6;

  // ---- sampling
  localparam int unsigned N_PHASE_CLK = 8;            // 420 MHz clocks, 0..157.5 degrees
  localparam int unsigned N_SAMPLES   = 16;           // both edges of the 8 clocks
  localparam int unsigned WORD_W      = 32;           // samples per 210 MHz cycle
  localparam int unsigned FINE_W      = 5;            // log2(WORD_W)

  // ---- time fields
  localparam int unsigned COARSE_W    = 24;           // 210 MHz cycles, wraps after ~80 ms
  localparam int unsigned TIME_W      = COARSE_W + FINE_W;
  localparam int unsigned TOT_W       = 8;            // ToT in bins, 255 bins = 37.9 ns

  typedef logic [TIME_W-1:0] tdc_time_t;

  // One measured pulse of one channel.
  typedef struct packed {
    logic [CH_W-1:0]  ch;
    logic             tot_ovf;   // pulse still high after TOT_MAX bins: tot saturated
    logic [TOT_W-1:0] tot;       // trailing minus leading edge, bins
    tdc_time_t        toa;       // leading edge, bins
  } hit_t;

  localparam int unsigned HIT_W = $bits(hit_t);

  // ---- 64-bit readout words
  typedef enum logic [3:0] {
    WT_HIT     = 4'h1,
    WT_HEADER  = 4'hA,
    WT_TRAILER = 4'hE
  } word_type_e;

  localparam int unsigned EVT_W = 24;

  typedef struct packed {          // 64 bits
    word_type_e       wtype;       // WT_HEADER
    logic [EVT_W-1:0] evt_no;
    logic [6:0]       rsvd;
    tdc_time_t        trig_time;
  } header_word_t;

  typedef struct packed {          // 64 bits
    word_type_e       wtype;       // WT_HIT
    logic [12:0]      rsvd;
    logic [CH_W-1:0]  ch;
    logic             tot_ovf;
    logic [TOT_W-1:0] tot;
    logic [2:0]       rsvd2;
    tdc_time_t        toa;
  } hit_word_t;

  typedef struct packed {          // 64 bits
    word_type_e       wtype;       // WT_TRAILER
    logic [EVT_W-1:0] evt_no;
    logic [15:0]      n_hits;
    logic [19:0]      rsvd;
  } trailer_word_t;

endpackage
