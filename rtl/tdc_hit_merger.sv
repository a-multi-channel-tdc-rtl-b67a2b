// tdc_hit_merger -- collects the hits of all channels into one stream.
//
// Every channel owns a small queue (CH_DEPTH hits) so that hits arriving on many
// channels in the same cycle are all kept. A round-robin arbiter takes one hit per
// 210 MHz cycle from the queues, starting after the channel served last, so no
// channel can starve another. A hit that finds its queue full is dropped and
// counted in n_dropped (saturating), and overflow pulses for one cycle. Channels
// whose bit of ch_enable is 0 are ignored (the DAQ uses this to keep the trigger
// channel out of the data stream).
//
// The document only says that the DAQ buffers hits; queue depth, arbitration and
// the drop policy are this design's own.
//
// Ports: clk, rst, ch_enable[N], in_valid[N], in_hit[N], out_valid/out_hit/
// out_ready (valid-ready handshake, data held while !out_ready), overflow,
// n_dropped. Latency: two cycles from in_valid to out_valid when idle.
`timescale 1ps / 1fs
module tdc_hit_merger
  import tdc_pkg::*;
#(
  parameter int unsigned N        = N_CH,
  parameter int unsigned CH_DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [N-1:0]  ch_enable,
  input  logic [N-1:0]  in_valid,
  input  hit_t          in_hit [N],
  output logic          out_valid,
  output hit_t          out_hit,
  input  logic          out_ready,
  output logic          overflow,
  output logic [15:0]   n_dropped
);

  localparam int unsigned IW = $clog2(N);

  logic [N-1:0] q_full, q_empty, q_rd;
  hit_t         q_data [N];
  logic [N-1:0] q_wr;

  for (genvar c = 0; c < N; c++) begin : g_q
    logic [$clog2(CH_DEPTH):0] cnt_unused;
    assign q_wr[c] = in_valid[c] && ch_enable[c] && !q_full[c];
    tdc_fifo #(.WIDTH(HIT_W), .DEPTH(CH_DEPTH)) u_q (
      .clk(clk), .rst(rst),
      .wr_en(q_wr[c]), .wr_data(in_hit[c]), .full(q_full[c]),
      .rd_en(q_rd[c]), .rd_data(q_data[c]), .empty(q_empty[c]),
      .count(cnt_unused)
    );
  end

  // round-robin choice among non-empty queues
  logic [IW-1:0] last, pick;
  logic          found;
  logic          load;

  always_comb begin
    found = 1'b0;
    pick  = last;
    for (int k = 1; k <= N; k++) begin
      int idx;
      idx = (int'(last) + k) % N;
      if (!found && !q_empty[idx]) begin
        found = 1'b1;
        pick  = IW'(idx);
      end
    end
  end

  assign load = found && (!out_valid || out_ready);

  always_comb begin
    q_rd = '0;
    if (load) q_rd[pick] = 1'b1;
  end

  logic [N-1:0] lost;
  logic [16:0]  drop_sum;
  assign lost     = in_valid & ch_enable & q_full;
  assign drop_sum = {1'b0, n_dropped} + 17'($countones(lost));

  always_ff @(posedge clk) begin
    if (rst) begin
      last      <= IW'(N - 1);
      out_valid <= 1'b0;
      out_hit   <= '0;
      overflow  <= 1'b0;
      n_dropped <= '0;
    end else begin
      if (load) begin
        out_valid <= 1'b1;
        out_hit   <= q_data[pick];
        last      <= pick;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
      overflow <= |lost;
      if (|lost) n_dropped <= (drop_sum > 17'hFFFF) ? 16'hFFFF : drop_sum[15:0];
    end
  end

endmodule
