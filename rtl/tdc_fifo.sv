// tdc_fifo -- synchronous first-in first-out buffer with show-ahead read.
//
// Used as the DAQ's event buffer (64-bit readout words waiting for the USB link),
// as the per-channel hit queues of the hit merger, and as the trigger queue and
// the hit buffer of the trigger matcher. The
// storage is a plain array (block or distributed RAM after synthesis) addressed
// by wrapping read and write pointers one bit wider than the address, so full and
// empty are told apart by the extra bit. rd_data always shows the oldest entry
// while !empty; rd_en removes it. A write to a full FIFO is taken only in a cycle
// that also reads (the matcher writes its head back that way); otherwise it is
// ignored, like a read from an empty one, and flagged by an assertion. Sizes are
// this design's choice.
//
// Ports: clk, rst (synchronous), wr_en/wr_data/full, rd_en/rd_data/empty,
// count (entries held). Write-to-read latency: one clock.
`timescale 1ps / 1fs
module tdc_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 1024   // power of two
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;

  assign count   = wptr - rptr;
  assign full    = (count == (AW + 1)'(DEPTH));
  assign empty   = (wptr == rptr);
  assign rd_data = mem[rptr[AW-1:0]];

  // a full FIFO still takes a write in a cycle that also reads
  logic do_wr;
  assign do_wr = wr_en && (!full || rd_en);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr)           wptr <= wptr + 1'b1;
      if (rd_en && !empty) rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));

endmodule
