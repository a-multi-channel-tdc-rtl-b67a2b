// tb_tdc_top -- end-to-end test of the whole design at its default parameters
// (36 channels, 420/210 MHz clocks from the PLL models, 80 MHz board clock),
// read out through the USB chip model (30 % busy). Pulse edges are placed in the
// middle of 148.8 ps bins counted from the first 0-degree clock edge, so every
// time difference in bins is known exactly.
//   1. Triggered data taking (trig_sel = 0): 6 trigger pulses on the trigger
//      channel, each with photon pulses on random channels 40 ns before to 40 ns
//      after it, one of them longer than the ToT range. Each event read back must
//      hold exactly the hits inside the window [-100, +100] bins, with the right
//      channel, ToT, overflow flag and ToA - trigger time (compared as sets).
//   2. Trigger burst: 8 trigger pulses 12 ns apart, no hits; the 4-deep trigger
//      queue must overflow (dropped triggers counted) and the rest give events.
//   3. Hit flood: all 35 data channels pulsing at 50 MHz with no trigger; the
//      per-channel queues must overflow (dropped hits counted) and nothing may
//      be read out.
//   4. Calibration (trig_sel = 1): trig_out drives a model pulse generator that
//      returns a pulse on channel 0 1234 ps later; each event must hold one hit
//      with the same ToA - trigger time.
// Mechanisms counted: trigger-channel events, zero-suppressed hits, ToT
// overflow, USB stall cycles, dropped triggers, dropped hits, calibration
// events. A mechanism that never happened counts as a failure.
`timescale 1ps / 1fs
module tb_tdc_top;
  import tdc_pkg::*;
  localparam real T = 2380.952381, TB = T / 16.0;

  logic clk80 = 0, rst_n = 0;
  logic [N_CH-1:0] hit_in = '0;
  logic trig_sel = 0, cal_enable = 0;
  logic [15:0] cal_period = 16'd300;
  logic trig_out, usb_txe_n, usb_wr_n, locked;
  logic [7:0] usb_data;
  logic [EVT_W-1:0] n_events;
  logic [15:0] n_hits_dropped, n_trig_dropped;
  logic [10:0] evt_fill;
  logic word_valid;
  logic [63:0] word;
  int perr, nbytes;
  int checks = 0, failures = 0;
  int m_trig_events = 0, m_suppressed = 0, m_ovf = 0, m_stall = 0, m_cal_events = 0;

  tdc_top dut (.clk80_in(clk80), .rst_n(rst_n), .hit_in(hit_in), .trig_sel(trig_sel),
    .cal_enable(cal_enable), .cal_period(cal_period), .trig_out(trig_out),
    .usb_txe_n(usb_txe_n), .usb_wr_n(usb_wr_n), .usb_data(usb_data), .locked(locked),
    .n_events(n_events), .n_hits_dropped(n_hits_dropped), .n_trig_dropped(n_trig_dropped),
    .evt_fill(evt_fill));

  tb_usb_host_model #(.BUSY_PCT(30)) u_host (.clk(dut.clk210), .usb_wr_n(usb_wr_n),
    .usb_data(usb_data), .usb_txe_n(usb_txe_n), .word_valid(word_valid), .word(word),
    .protocol_errors(perr), .bytes(nbytes));

  always #6250 clk80 = ~clk80;
  always @(posedge dut.clk210) if (usb_txe_n && evt_fill != 0) m_stall++;

  realtime t0;       // first 0-degree edge: bin 0 starts here
  function automatic realtime bin_time(int b);
    return t0 + (b + 0.5) * TB;
  endfunction
  function automatic int now_bin();
    return int'(($realtime - t0) / TB);
  endfunction

  // pulse driver: one process per pulse
  task automatic pulse(int ch, int b_rise, int b_fall);
    fork
      begin
        #(bin_time(b_rise) - $realtime);
        hit_in[ch] = 1'b1;
        #(bin_time(b_fall) - $realtime);
        hit_in[ch] = 1'b0;
      end
    join_none
  endtask

  // ---- expected events: set of {ch, ovf, tot, toa - trigger} per event
  typedef logic [63:0] key_t;
  typedef struct { key_t hits [$]; logic cal; } evt_t;
  evt_t exp_e [$];
  int   evt_no = 0;
  logic expect_any = 1;   // in phase 3 no word may appear
  logic allow_empty = 0;  // phase 2: events with no hits may come without a record
  logic cal_seen = 0;
  key_t cal_ref;

  function automatic key_t mk_key(int ch, logic ovf, int tot, int rel);
    return {CH_W'(ch), ovf, TOT_W'(tot), 32'(rel), 17'd0};
  endfunction

  logic in_evt = 0;
  tdc_time_t trig_toa;
  key_t body [$];
  always @(posedge dut.clk210) if (word_valid) begin
    if (!expect_any) begin failures++; $display("word %h read during the hit flood", word); end
    if (!in_evt) begin
      checks++;
      if (word[63:60] != WT_HEADER || word[59:36] != EVT_W'(evt_no)) begin
        failures++; $display("expected header of event %0d, got %h", evt_no, word);
      end
      trig_toa = word[TIME_W-1:0];
      in_evt = 1; body.delete();
    end else if (word[63:60] == WT_HIT) begin
      hit_word_t h;
      h = word;
      body.push_back(mk_key(int'(h.ch), h.tot_ovf, int'(h.tot), int'($signed(h.toa - trig_toa))));
      if (h.tot_ovf) m_ovf++;
    end else begin
      checks++;
      if (word[63:60] != WT_TRAILER || word[35:20] != 16'(body.size())) begin
        failures++; $display("bad trailer %h (%0d hits)", word, body.size());
      end
      if (exp_e.size() == 0) begin
        checks++;
        if (!allow_empty || body.size() != 0) begin
          failures++; $display("unexpected event %0d with %0d hits", evt_no, body.size());
        end
      end else if (exp_e[0].cal) begin
        // calibration: one hit on channel 0, identical in every event
        checks++;
        if (body.size() != 1 || body[0][63:58] != 0 || (cal_seen && body[0] != cal_ref)) begin
          failures++; $display("calibration event %0d: %0d hits, first %h", evt_no, body.size(), body.size() != 0 ? body[0] : 64'(0));
        end
        if (body.size() == 1 && !cal_seen) begin
          cal_ref = body[0]; cal_seen = 1;
          $display("calibration hit: tot %0d bins, ToA - trigger %0d bins", body[0][56:49], $signed(body[0][48:17]));
        end
        m_cal_events++;
        void'(exp_e.pop_front());
      end else begin
        key_t e [$];
        e = exp_e[0].hits;
        e.sort(); body.sort();
        checks++;
        if (e != body) begin
          failures++;
          $display("event %0d: %0d hits, expected %0d", evt_no, body.size(), e.size());
          foreach (body[i]) $display("  got      ch %0d ovf %b tot %0d rel %0d", body[i][63:58], body[i][57], body[i][56:49], $signed(body[i][48:17]));
          foreach (e[i])    $display("  expected ch %0d ovf %b tot %0d rel %0d", e[i][63:58], e[i][57], e[i][56:49], $signed(e[i][48:17]));
        end
        m_trig_events++;
        void'(exp_e.pop_front());
      end
      evt_no++;
      in_evt = 0;
    end
  end

  initial begin
    int b;
    #100_000 rst_n = 1;     // releases the PLLs; the logic leaves reset once locked
    @(posedge locked);
    @(posedge dut.clk_ph[0]);
    t0 = $realtime;         // any 0-degree edge serves as the origin of the bins
    #(40 * T);
    // ---- 1. triggered events
    b = now_bin() + 200;
    for (int j = 0; j < 6; j++) begin
      automatic evt_t e;
      automatic int tb_ = b + 700;         // trigger bin
      automatic int off = $urandom_range(0, 34);
      pulse(TRIG_CH, tb_, tb_ + 33);       // 5 ns trigger pulse
      for (int i = 0; i < 10; i++) begin
        // ten different data channels, one pulse each in this window
        automatic int c = (off + 3 * i) % 35;
        automatic int r = tb_ + $urandom_range(0, 540) - 270;
        automatic int w = $urandom_range(3, 200);
        if (c == TRIG_CH) c = 35;
        if (i == 0) begin r = tb_ + 10; w = 320; end   // longer than the ToT range
        pulse(c, r, r + w);
        if (r - tb_ >= -100 && r - tb_ <= 100)
          e.hits.push_back(mk_key(c, w >= 255, w >= 255 ? 255 : w, r - tb_));
        else m_suppressed++;
      end
      e.cal = 0;
      exp_e.push_back(e);
      b = tb_ + 1400;
    end
    #((b - now_bin()) * TB);
    for (int k = 0; k < 20000 && exp_e.size() != 0; k++) @(posedge dut.clk210);
    #(2000 * TB);
    checks++;
    if (exp_e.size() != 0) begin failures++; $display("%0d triggered events not read", exp_e.size()); end
    // ---- 2. trigger burst
    begin
      automatic int n0 = int'(n_events);
      b = now_bin() + 100;
      for (int j = 0; j < 8; j++) pulse(TRIG_CH, b + j * 81, b + j * 81 + 20);
      allow_empty = 1;
      #(6000 * TB);
      allow_empty = 0;
      // the accepted triggers give empty events; take them off the checker
      checks++;
      if (n_trig_dropped == 0) begin failures++; $display("trigger queue never overflowed"); end
      checks++;
      if (int'(n_events) - n0 + int'(n_trig_dropped) != 8) begin
        failures++; $display("burst: %0d events, %0d dropped", int'(n_events) - n0, n_trig_dropped);
      end
    end
    // ---- 3. hit flood, no trigger
    #(2000 * TB);
    expect_any = 0;
    b = now_bin() + 100;
    for (int c = 0; c < N_CH; c++) if (c != TRIG_CH)
      for (int k = 0; k < 20; k++) pulse(c, b + k * 134 + c, b + k * 134 + c + 30);
    #((20 * 134 + 3000) * TB);
    // the flood drains one hit per cycle once released: let it finish
    for (int k = 0; k < 40000 && !(dut.u_daq.u_match.hb_empty && dut.u_daq.u_merge.q_empty == '1); k++)
      @(posedge dut.clk210);
    #(2000 * TB);
    checks++;
    if (n_hits_dropped == 0) begin failures++; $display("no hit was dropped in the flood"); end
    expect_any = 1;
    // ---- 4. calibration
    trig_sel = 1;
    cal_enable = 1;
    for (int j = 0; j < 6; j++) begin
      automatic evt_t e;
      @(posedge trig_out);
      // pulse generator: 1234 ps after the trigger output edge, 10 ns long
      fork begin #1234; hit_in[0] = 1'b1; #10000; hit_in[0] = 1'b0; end join_none
      e.cal = 1;
      exp_e.push_back(e);
    end
    @(negedge trig_out);
    cal_enable = 0;
    for (int k = 0; k < 20000 && exp_e.size() != 0; k++) @(posedge dut.clk210);
    checks++;
    if (exp_e.size() != 0) begin failures++; $display("%0d calibration events not read", exp_e.size()); end
    // ---- mechanisms
    checks++; if (m_trig_events != 6)  begin failures++; $display("trigger-channel events %0d", m_trig_events); end
    checks++; if (m_suppressed == 0)   begin failures++; $display("no hit suppressed"); end
    checks++; if (m_ovf == 0)          begin failures++; $display("no ToT overflow"); end
    checks++; if (m_stall == 0)        begin failures++; $display("USB never stalled"); end
    checks++; if (m_cal_events != 6)   begin failures++; $display("calibration events %0d", m_cal_events); end
    checks++; if (perr != 0)           begin failures++; $display("USB protocol errors %0d", perr); end
    $display("mechanisms: trigger events %0d, suppressed hits %0d, ToT overflows %0d, USB stall cycles %0d, dropped triggers %0d, dropped hits %0d, calibration events %0d",
             m_trig_events, m_suppressed, m_ovf, m_stall, n_trig_dropped, n_hits_dropped, m_cal_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
