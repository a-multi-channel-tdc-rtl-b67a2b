// tb_tdc_trigger_matcher -- WIN_PRE 20, WIN_POST 30, LATENCY 128 bins.
//   A. 20 triggers 2000 bins apart, hits scattered around them (inside and
//      outside the windows), fed in time order one cycle after their leading
//      edge, triggers fed 2 cycles after theirs. The words must be, per trigger:
//      header (event number, trigger time), the hits with T-20 <= toa <= T+30 in
//      order, trailer (event number, hit count). Other hits must vanish.
//   B. the same with the output stalled at random: same words.
//   C. six triggers on consecutive cycles with a 4-deep trigger queue: 5 events,
//      one trigger counted as dropped.
//   D. an event with one hit in its window, then 300 hits after the window
//      offered back to back: the 256-entry hit buffer fills while the merger
//      side keeps offering. The event must still close (header, the hit,
//      trailer) and every hit must be taken.
`timescale 1ps / 1fs
module tb_tdc_trigger_matcher;
  import tdc_pkg::*;
  localparam int PRE = 20, POST = 30, LAT = 128;
  logic clk = 0, rst;
  logic [COARSE_W-1:0] coarse;
  logic hit_valid, hit_ready, trig_valid, out_valid, out_ready, busy;
  hit_t hit;
  tdc_time_t trig_time;
  logic [63:0] out_word;
  logic [EVT_W-1:0] n_events;
  logic [15:0] n_trig_dropped;
  int checks = 0, failures = 0, n_stalls = 0, n_dropped_hits = 0;

  tdc_trigger_matcher #(.WIN_PRE(PRE), .WIN_POST(POST), .LATENCY(LAT), .TRIG_DEPTH(4)) dut (.*);
  always #500 clk = ~clk;
  always @(posedge clk) coarse <= rst ? '0 : coarse + 1'b1;

  int   trig_t [$];
  hit_t hits [$];
  logic [63:0] expect_q [$];
  logic stall_mode = 0;

  always @(posedge clk) if (!rst && out_valid) begin
    if (!out_ready) n_stalls++;
    else begin
      checks++;
      if (expect_q.size() == 0 || out_word !== expect_q[0]) begin
        failures++;
        $display("word %h expected %h", out_word, expect_q.size() ? expect_q[0] : 64'hx);
      end
      if (expect_q.size()) void'(expect_q.pop_front());
    end
  end

  task automatic run_scenario(int evt0);
    int hk = 0, tk = 0;
    logic took = 0;
    trig_t.delete(); hits.delete(); expect_q.delete();
    for (int j = 0; j < 20; j++) trig_t.push_back(2000 + int'(coarse) * 32 + j * 2000);
    for (int j = 0; j < 20; j++) begin
      int nh = $urandom_range(0, 6);
      int tt = trig_t[j];
      int cnt = 0;
      int hs [$];
      for (int i = 0; i < nh; i++) hs.push_back(tt + $urandom_range(0, 120) - 50);
      hs.sort();
      foreach (hs[i]) begin
        hit_t h;
        h.ch = CH_W'($urandom_range(0, 35)); h.toa = TIME_W'(hs[i]);
        h.tot = TOT_W'($urandom); h.tot_ovf = 0;
        hits.push_back(h);
      end
      expect_q.push_back({WT_HEADER, EVT_W'(evt0 + j), 7'd0, TIME_W'(tt)});
      foreach (hs[i]) if (hs[i] >= tt - PRE && hs[i] <= tt + POST) begin
        hit_t h = hits[hits.size() - hs.size() + i];
        expect_q.push_back({WT_HIT, 13'd0, h.ch, h.tot_ovf, h.tot, 3'd0, h.toa});
        cnt++;
      end else n_dropped_hits++;
      expect_q.push_back({WT_TRAILER, EVT_W'(evt0 + j), 16'(cnt), 20'd0});
    end
    while (hk < hits.size() || tk < trig_t.size() || expect_q.size() != 0) begin
      int now;
      @(negedge clk);
      now = int'(coarse) * 32;
      if (took) hk++;
      hit_valid = (hk < hits.size()) && (now >= int'(hits[hk].toa) + 32);
      if (hk < hits.size()) hit = hits[hk];
      trig_valid = (tk < trig_t.size()) && (now >= trig_t[tk] + 64);
      if (trig_valid) begin trig_time = TIME_W'(trig_t[tk]); tk++; end
      out_ready = stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
      #400 took = hit_valid && hit_ready;   // handshake as seen by the next edge
      if (now > trig_t[19] + 20000) break;
    end
    @(negedge clk); hit_valid = 0; trig_valid = 0; out_ready = 1;
    checks++;
    if (expect_q.size() != 0) begin failures++; $display("%0d words missing", expect_q.size()); end
  endtask

  initial begin
    rst = 1; hit_valid = 0; trig_valid = 0; out_ready = 1; hit = '0; trig_time = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run_scenario(0);                         // A
    stall_mode = 1;
    run_scenario(20);                        // B
    stall_mode = 0;
    checks++;
    if (n_stalls == 0) begin failures++; $display("output never stalled"); end
    checks++;
    if (n_dropped_hits == 0) begin failures++; $display("no hit outside a window"); end
    // C
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); trig_valid = 1; trig_time = {coarse, 5'd0};
      if (i < 5) begin   // the sixth finds the queue full
        expect_q.push_back({WT_HEADER, EVT_W'(40 + i), 7'd0, trig_time});
        expect_q.push_back({WT_TRAILER, EVT_W'(40 + i), 16'd0, 20'd0});
      end
    end
    @(negedge clk); trig_valid = 0;
    repeat (200) @(posedge clk);
    checks++;
    if (expect_q.size() != 0) begin failures++; $display("burst: %0d words missing", expect_q.size()); end
    checks++;
    if (n_trig_dropped != 16'd1) begin failures++; $display("triggers dropped %0d", n_trig_dropped); end
    checks++;
    if (n_events != EVT_W'(45)) begin failures++; $display("events %0d", n_events); end
    // D
    begin
      automatic int t0 = int'(coarse) * 32 + 64;
      automatic int k = 0;
      automatic int full_cycles = 0;
      automatic hit_t h0 = '{ch: 6'd3, tot_ovf: 1'b0, tot: 8'd9, toa: TIME_W'(t0)};
      @(negedge clk); trig_valid = 1; trig_time = TIME_W'(t0);
      expect_q.push_back({WT_HEADER, EVT_W'(45), 7'd0, TIME_W'(t0)});
      expect_q.push_back({WT_HIT, 13'd0, h0.ch, h0.tot_ovf, h0.tot, 3'd0, h0.toa});
      expect_q.push_back({WT_TRAILER, EVT_W'(45), 16'd1, 20'd0});
      @(negedge clk); trig_valid = 0;
      // one hit in the window, then 300 after it offered back to back
      while (k < 301 && full_cycles < 5000) begin
        @(negedge clk);
        hit_valid = 1;
        hit = (k == 0) ? h0 : '{ch: 6'd4, tot_ovf: 1'b0, tot: 8'd5, toa: TIME_W'(t0 + POST + 1 + k)};
        #400 if (hit_ready) k++;   // taken at the next edge
        if (dut.hb_full) full_cycles++;
      end
      @(negedge clk); hit_valid = 0;
      for (int i = 0; i < 20000 && expect_q.size() != 0; i++) @(posedge clk);
      checks++;
      if (expect_q.size() != 0 || k < 301) begin
        failures++; $display("full buffer: %0d words missing, %0d hits taken", expect_q.size(), k);
      end
      checks++;
      if (full_cycles == 0) begin failures++; $display("hit buffer never full"); end
      checks++;
      if (n_events != EVT_W'(46)) begin failures++; $display("events %0d", n_events); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
