// tb_tdc_hit_merger -- four channels (channel 3 disabled).
//   1. sparse random hits with a randomly stalled output: every hit of an enabled
//      channel must come out once, in order per channel; channel 3 never;
//   2. all enabled channels hit every cycle with the output always ready: the
//      output must serve the channels in turn (round robin);
//   3. output stalled while channel 0 hits for 10 cycles: 4 hits queue, the other
//      6 must be counted in n_dropped and flag overflow.
`timescale 1ps / 1fs
module tb_tdc_hit_merger;
  import tdc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst;
  logic [N-1:0] ch_enable, in_valid;
  hit_t in_hit [N];
  logic out_valid, out_ready, overflow;
  hit_t out_hit;
  logic [15:0] n_dropped;
  int checks = 0, failures = 0, n_ovf_flags = 0;
  tdc_time_t sent [N][$];

  tdc_hit_merger #(.N(N), .CH_DEPTH(4)) dut (.*);
  always #500 clk = ~clk;
  always @(posedge clk) if (overflow) n_ovf_flags++;

  int seq = 0;
  task automatic drive(logic [N-1:0] v);
    for (int c = 0; c < N; c++) begin
      in_hit[c].ch = CH_W'(c); in_hit[c].toa = TIME_W'(seq); in_hit[c].tot = TOT_W'(c); in_hit[c].tot_ovf = 0;
      if (v[c] && ch_enable[c]) sent[c].push_back(TIME_W'(seq));
    end
    in_valid = v;
    seq++;
  endtask

  // output checker: per channel order
  int got = 0;
  int last_ch = -1, rr_errors = 0;
  logic rr_phase = 0;
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    int c;
    c = int'(out_hit.ch);
    checks++;
    if (c >= N || !ch_enable[c] || sent[c].size() == 0 || out_hit.toa !== sent[c][0]) begin
      failures++;
      $display("unexpected hit ch %0d toa %0d", c, out_hit.toa);
    end else void'(sent[c].pop_front());
    if (rr_phase && last_ch >= 0) begin
      checks++;
      if (c != (last_ch == 2 ? 0 : last_ch + 1)) begin failures++; $display("round robin: %0d after %0d", c, last_ch); end
    end
    last_ch = c;
    got++;
  end

  initial begin
    rst = 1; ch_enable = 4'b0111; in_valid = '0; out_ready = 0;
    foreach (in_hit[c]) in_hit[c] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // 1.
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      drive(N'($urandom) & N'($urandom) & N'($urandom));
      out_ready = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk); in_valid = '0; out_ready = 1;
    repeat (30) @(posedge clk);
    for (int c = 0; c < N; c++) begin
      checks++;
      if (sent[c].size() != 0) begin failures++; $display("ch %0d: %0d hits lost", c, sent[c].size()); end
    end
    checks++;
    if (n_dropped != 0) begin failures++; $display("drops in phase 1: %0d", n_dropped); end
    // 2.
    @(negedge clk); rr_phase = 1; last_ch = -1;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      drive((i % 3 == 0) ? 4'b0111 : 4'b0000);   // 3 hits per 3 cycles: stays fed
    end
    @(negedge clk); in_valid = '0;
    repeat (30) @(posedge clk);
    rr_phase = 0;
    foreach (sent[c]) sent[c].delete();
    // 3.
    @(negedge clk); out_ready = 0;
    for (int i = 0; i < 10; i++) begin @(negedge clk); drive(4'b0001); end
    @(negedge clk); in_valid = '0;
    @(posedge clk); @(negedge clk);
    // 4 queued plus one held in the output register: 5 kept, 5 dropped
    checks++;
    if (n_dropped != 16'd5) begin failures++; $display("expected 5 drops, got %0d", n_dropped); end
    checks++;
    if (n_ovf_flags == 0) begin failures++; $display("overflow never flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
