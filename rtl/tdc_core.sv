// tdc_core -- the multi-channel TDC: N_CH identical channels sharing the sixteen
// sampling phases and one coarse time counter.
//
// Following the document, the core has 34 photon channels and two more, one of
// which (TRIG_CH) timestamps the external trigger; the other is a spare that is
// read out like a photon channel. The coarse counter counts 210 MHz cycles and is
// the upper part of every timestamp, the channel's bin index the lower five bits,
// so all channels and the trigger share one time base. Hits leave the core as one
// valid/data pair per channel; a channel produces at most one hit per cycle.
//
// Ports: clk_ph[7:0], clk210, rst (synchronous), hit_in[N_CH], coarse,
// hit_valid[N_CH], hits[N_CH].
`timescale 1ps / 1fs
module tdc_core
  import tdc_pkg::*;
#(
  parameter int unsigned N      = N_CH,
  parameter int unsigned TOT_MAX = (1 << TOT_W) - 1
) (
  input  logic [7:0]          clk_ph,
  input  logic                clk210,
  input  logic                rst,
  input  logic [N-1:0]        hit_in,
  output logic [COARSE_W-1:0] coarse,
  output logic [N-1:0]        hit_valid,
  output hit_t                hits [N]
);

  always_ff @(posedge clk210) begin
    if (rst) coarse <= '0;
    else     coarse <= coarse + 1'b1;
  end

  for (genvar c = 0; c < N; c++) begin : g_ch
    tdc_channel #(.CH(CH_W'(c)), .TOT_MAX(TOT_MAX)) u_ch (
      .clk_ph(clk_ph), .clk210(clk210), .rst(rst), .hit_in(hit_in[c]),
      .coarse(coarse), .hit_valid(hit_valid[c]), .hit(hits[c])
    );
  end

endmodule
