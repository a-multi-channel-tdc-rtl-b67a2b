// tdc_top -- multi-channel TDC in an FPGA with ~150 ps bins, for time-resolved
// readout of Cherenkov photons, with its DAQ and USB readout.
//
// Each channel input is sampled by sixteen flip-flops clocked 22.5 degrees
// (148.8 ps) apart over a 420 MHz period (eight 420 MHz clocks, both edges), so a
// pulse appears as a run of ones in the sampled pattern; its first one gives the
// time of arrival (ToA) and the run length the time over threshold (ToT). The
// channels (34 photon channels, one trigger channel and one spare) share the
// clocks and a 210 MHz coarse counter. The DAQ keeps the hits that lie in a window
// around each trigger and sends them, framed as events, over a USB byte port.
//
// Blocks: tdc_clocking (behavioural model of the clock input and three PLLs),
// tdc_core (channels), tdc_daq (merger, trigger matcher, event buffer, USB
// sender, calibration trigger output). A synchroniser releases the 210 MHz reset
// eight cycles after all PLLs are locked and rst_n is high.
//
// Ports: clk80_in (80 MHz board clock), rst_n, hit_in[N_CH] (discriminator
// outputs; hit_in[TRIG_CH] is the external trigger), trig_sel (0: trigger channel,
// 1: calibration trigger), cal_enable/cal_period (calibration trigger period in
// 210 MHz cycles), trig_out, usb_txe_n/usb_wr_n/usb_data, locked, status counters.
// The configuration inputs would be set by the host in a complete system; how is
// not part of this design.
`timescale 1ps / 1fs
module tdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned CH_DEPTH  = 4,
  parameter int unsigned EVT_DEPTH = 1024,
  parameter int unsigned WIN_PRE   = 100,
  parameter int unsigned WIN_POST  = 100,
  parameter int unsigned LATENCY   = 1024,
  parameter int unsigned TOT_MAX   = (1 << TOT_W) - 1,
  parameter int unsigned CAL_WIDTH = 8
) (
  input  logic                        clk80_in,
  input  logic                        rst_n,
  input  logic [N_CH-1:0]             hit_in,
  input  logic                        trig_sel,
  input  logic                        cal_enable,
  input  logic [15:0]                 cal_period,
  output logic                        trig_out,
  input  logic                        usb_txe_n,
  output logic                        usb_wr_n,
  output logic [7:0]                  usb_data,
  output logic                        locked,
  output logic [EVT_W-1:0]            n_events,
  output logic [15:0]                 n_hits_dropped,
  output logic [15:0]                 n_trig_dropped,
  output logic [$clog2(EVT_DEPTH):0]  evt_fill
);

  logic       clk210;
  logic [7:0] clk_ph;

  tdc_clocking u_clk (
    .clk80_in(clk80_in), .rst(!rst_n), .clk210(clk210), .clk_ph(clk_ph), .locked(locked)
  );

  // Reset release synchronised to 210 MHz and held for RST_CYCLES cycles, so the
  // sampling and synchronising flip-flops (which have no reset and start running
  // only when their PLL locks) are flushed before the encoders look at them.
  // clk210 only runs once the PLLs are locked, so the shift register relies on
  // the FPGA's power-up value (all ones) rather than on a reset of its own; the
  // lint note about an initialised variable written in a process stands for that.
  localparam int RST_CYCLES = 8;
  logic [RST_CYCLES-1:0] rst_sync = '1;
  logic                  rst;
  always_ff @(posedge clk210) rst_sync <= {rst_sync[RST_CYCLES-2:0], !rst_n || !locked};
  assign rst = rst_sync[RST_CYCLES-1];

  logic [COARSE_W-1:0] coarse;
  logic [N_CH-1:0]     hit_valid;
  hit_t                hits [N_CH];

  tdc_core #(.N(N_CH), .TOT_MAX(TOT_MAX)) u_core (
    .clk_ph(clk_ph), .clk210(clk210), .rst(rst), .hit_in(hit_in),
    .coarse(coarse), .hit_valid(hit_valid), .hits(hits)
  );

  tdc_daq #(
    .N(N_CH), .TRIG(TRIG_CH), .CH_DEPTH(CH_DEPTH), .EVT_DEPTH(EVT_DEPTH),
    .WIN_PRE(WIN_PRE), .WIN_POST(WIN_POST), .LATENCY(LATENCY), .CAL_WIDTH(CAL_WIDTH)
  ) u_daq (
    .clk(clk210), .rst(rst), .coarse(coarse), .hit_valid(hit_valid), .hits(hits),
    .trig_sel(trig_sel), .cal_enable(cal_enable), .cal_period(cal_period),
    .trig_out(trig_out), .usb_txe_n(usb_txe_n), .usb_wr_n(usb_wr_n), .usb_data(usb_data),
    .n_events(n_events), .n_hits_dropped(n_hits_dropped), .n_trig_dropped(n_trig_dropped),
    .evt_fill(evt_fill)
  );

endmodule
