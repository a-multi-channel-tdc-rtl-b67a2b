// tb_tdc_daq -- the DAQ fed with hit pulses as the core would give them (36
// channels, channel 34 = trigger), read out through the USB chip model (40 %
// busy). Default window: 100 bins before, 100 after the trigger.
//   1. trig_sel = 0: 12 triggers from channel 34, 3000 bins apart, each with hits
//      on random data channels from 300 bins before to 300 after. Every event read
//      over USB must hold a header with the trigger time, exactly the hits inside
//      the window (compared as a set: the merger may reorder hits of one cycle),
//      and a trailer with the right count; events in order.
//   2. trig_sel = 1, calibration trigger every 400 cycles: a hit 50 bins after each
//      trig_out rise (taken as the trigger time) on channel 0; each event must
//      hold that one hit, and trig_out must have toggled.
// Counts: events, hits outside windows (zero suppression), USB stall cycles.
`timescale 1ps / 1fs
module tb_tdc_daq;
  import tdc_pkg::*;
  logic clk = 0, rst;
  logic [COARSE_W-1:0] coarse;
  logic [N_CH-1:0] hit_valid;
  hit_t hits [N_CH];
  logic trig_sel, cal_enable, trig_out, usb_txe_n, usb_wr_n;
  logic [15:0] cal_period;
  logic [7:0] usb_data;
  logic [EVT_W-1:0] n_events;
  logic [15:0] n_hits_dropped, n_trig_dropped;
  logic [10:0] evt_fill;
  logic word_valid;
  logic [63:0] word;
  int perr, nbytes;
  int checks = 0, failures = 0, n_suppressed = 0, n_stall = 0;

  tdc_daq dut (.*);
  tb_usb_host_model #(.BUSY_PCT(40)) u_host (.clk(clk), .usb_wr_n(usb_wr_n), .usb_data(usb_data),
    .usb_txe_n(usb_txe_n), .word_valid(word_valid), .word(word), .protocol_errors(perr), .bytes(nbytes));

  always #1190 clk = ~clk;
  always @(posedge clk) coarse <= rst ? '0 : coarse + 1'b1;
  always @(posedge clk) if (!usb_wr_n == 0 && !usb_txe_n == 0 && evt_fill != 0) n_stall++;

  // expected events
  typedef struct { int t; int n; logic [63:0] hw [$]; } evt_t;
  evt_t exp_e [$];
  int   evt_no = 0;

  // decoder
  typedef enum {D_HDR, D_BODY} dstate_e;
  dstate_e ds = D_HDR;
  logic [63:0] body [$];
  always @(posedge clk) if (word_valid) begin
    if (ds == D_HDR) begin
      checks++;
      if (exp_e.size() == 0 || word !== {WT_HEADER, EVT_W'(evt_no), 7'd0, TIME_W'(exp_e[0].t)}) begin
        failures++; $display("header %h (event %0d)", word, evt_no);
      end
      ds = D_BODY; body.delete();
    end else if (word[63:60] == WT_HIT) begin
      body.push_back(word);
    end else begin
      checks++;
      if (word !== {WT_TRAILER, EVT_W'(evt_no), 16'(body.size()), 20'd0}) begin
        failures++; $display("trailer %h", word);
      end
      if (exp_e.size() != 0) begin
        logic [63:0] e [$];
        e = exp_e[0].hw;
        e.sort(); body.sort();
        checks++;
        if (e != body) begin
          failures++; $display("event %0d: %0d hits, expected %0d", evt_no, body.size(), e.size());
        end
        void'(exp_e.pop_front());
      end
      evt_no++;
      ds = D_HDR;
    end
  end

  task automatic idle_cycle();
    @(negedge clk);
    hit_valid = '0;
  endtask

  initial begin
    rst = 1; hit_valid = '0; trig_sel = 0; cal_enable = 0; cal_period = 16'd400;
    foreach (hits[c]) hits[c] = '0;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    // ---- 1.
    begin
      automatic int base = int'(coarse) * 32 + 2000;
      typedef struct { int t; int ch; int tot; logic trig; } ev_t;
      ev_t evs [$];
      for (int j = 0; j < 12; j++) begin
        automatic evt_t e;
        automatic int tt = base + j * 3000;
        e.t = tt; e.n = 0;
        evs.push_back('{tt, 34, 20, 1'b1});
        for (int i = 0; i < 8; i++) begin
          automatic int h = tt + $urandom_range(0, 600) - 300;
          automatic int c = $urandom_range(0, 35);
          automatic int tot = $urandom_range(1, 200);
          if (c == 34) c = 35;
          evs.push_back('{h, c, tot, 1'b0});
          if (h >= tt - 100 && h <= tt + 100) begin
            e.hw.push_back({WT_HIT, 13'd0, CH_W'(c), 1'b0, TOT_W'(tot), 3'd0, TIME_W'(h)});
            e.n++;
          end else n_suppressed++;
        end
        exp_e.push_back(e);
      end
      evs.sort() with (item.t);
      // present each as a hit pulse 64 bins after its time; one per channel per cycle
      foreach (evs[i]) begin
        while (int'(coarse) * 32 < evs[i].t + 64 || hit_valid[evs[i].ch]) idle_cycle();
        hit_valid[evs[i].ch] = 1'b1;
        hits[evs[i].ch] = '{ch: CH_W'(evs[i].ch), tot_ovf: 1'b0, tot: TOT_W'(evs[i].tot), toa: TIME_W'(evs[i].t)};
      end
      idle_cycle();
      repeat (3000) @(posedge clk);
      checks++;
      if (exp_e.size() != 0) begin failures++; $display("%0d events not read", exp_e.size()); end
    end
    // ---- 2.
    trig_sel = 1; cal_enable = 1;
    for (int j = 0; j < 8; j++) begin
      automatic evt_t e;
      int tt;
      @(posedge trig_out);
      @(negedge clk);
      tt = int'(coarse) * 32;
      e.t = tt; e.n = 1;
      e.hw.push_back({WT_HIT, 13'd0, CH_W'(0), 1'b0, TOT_W'(10), 3'd0, TIME_W'(tt + 50)});
      exp_e.push_back(e);
      while (int'(coarse) * 32 < tt + 50 + 64) idle_cycle();
      hit_valid[0] = 1'b1;
      hits[0] = '{ch: CH_W'(0), tot_ovf: 1'b0, tot: TOT_W'(10), toa: TIME_W'(tt + 50)};
      idle_cycle();
    end
    @(negedge clk); cal_enable = 0;
    repeat (2000) @(posedge clk);
    checks++;
    if (exp_e.size() != 0) begin failures++; $display("%0d calibration events not read", exp_e.size()); end
    checks++;
    if (perr != 0) begin failures++; $display("USB protocol errors %0d", perr); end
    checks++;
    if (n_events != EVT_W'(20) || n_hits_dropped != 0 || n_trig_dropped != 0) begin
      failures++; $display("events %0d dropped hits %0d dropped triggers %0d", n_events, n_hits_dropped, n_trig_dropped);
    end
    checks++;
    if (n_suppressed == 0 || n_stall == 0) begin failures++; $display("suppressed %0d stalls %0d", n_suppressed, n_stall); end
    $display("events %0d suppressed hits %0d stall cycles %0d", evt_no, n_suppressed, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
