// tdc_channel -- one complete TDC channel: sixteen sampling flip-flops, the
// synchroniser into the 210 MHz domain and the ToA/ToT hit encoder.
//
// The channel is the replicable unit of the design: the core is built by placing
// as many copies as the FPGA holds (34 photon channels plus two more in the
// document). A pulse on hit_in is reported as one hit (leading-edge time,
// time over threshold, channel number CH) 3 to 4 periods of 420 MHz plus one
// 210 MHz cycle after its falling edge, or after TOT_MAX bins if it stays high.
//
// Ports: clk_ph[7:0] (420 MHz phases), clk210, rst (synchronous to clk210),
// hit_in (asynchronous input), coarse (shared 210 MHz cycle counter), hit_valid,
// hit.
`timescale 1ps / 1fs
module tdc_channel
  import tdc_pkg::*;
#(
  parameter logic [CH_W-1:0] CH      = '0,
  parameter int unsigned     TOT_MAX = (1 << TOT_W) - 1
) (
  input  logic [7:0]          clk_ph,
  input  logic                clk210,
  input  logic                rst,
  input  logic                hit_in,
  input  logic [COARSE_W-1:0] coarse,
  output logic                hit_valid,
  output hit_t                hit
);

  logic [15:0]       smp;
  logic [WORD_W-1:0] word;

  tdc_sampling_ffs u_smp (
    .clk_ph(clk_ph), .hit_in(hit_in), .smp(smp)
  );

  tdc_sync_logic u_sync (
    .clk_ph(clk_ph), .clk210(clk210), .smp(smp), .word(word)
  );

  tdc_hit_encoder #(.CH(CH), .TOT_MAX(TOT_MAX)) u_enc (
    .clk(clk210), .rst(rst), .word(word), .coarse(coarse),
    .hit_valid(hit_valid), .hit(hit)
  );

endmodule
