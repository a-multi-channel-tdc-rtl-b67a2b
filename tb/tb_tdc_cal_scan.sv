// tb_tdc_cal_scan -- the bin-width calibration run, done on the whole design at
// its default parameters. The design issues calibration triggers (trig_sel = 1,
// trig_out every 300 cycles); a model pulse generator answers each trig_out rise
// with a 5 ns pulse on channel 0, delayed by 1000 ps + d, where d steps from 0 to
// 3000 ps in 10 ps steps (301 events, one per step). Each event is read back
// through the USB bridge model and gives the bin of the pulse relative to the
// trigger time. Checks:
//   - every event holds exactly one hit, on channel 0;
//   - the bin never goes back and never jumps by more than one per 10 ps step;
//   - over 3000 ps the bin advances by 20 or 21 (3000 / 148.8 ps = 20.2);
//   - every bin entered and left within the scan spans 14 or 15 steps, i.e. a
//     measured width of 140-150 ps against the ideal 148.8 ps;
//   - all sixteen bins of a clock period are seen.
// The measured widths are printed as a table, the quantity a calibration of the
// real chip extracts (there the widths spread because of routing skew; in this
// model all bins are ideal).
`timescale 1ps / 1fs
module tb_tdc_cal_scan;
  import tdc_pkg::*;
  localparam int STEP_PS = 10, N_STEPS = 301;

  logic clk80 = 0, rst_n = 0;
  logic [N_CH-1:0] hit_in = '0;
  logic trig_sel = 1, cal_enable = 0;
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

  tdc_top dut (.clk80_in(clk80), .rst_n(rst_n), .hit_in(hit_in), .trig_sel(trig_sel),
    .cal_enable(cal_enable), .cal_period(cal_period), .trig_out(trig_out),
    .usb_txe_n(usb_txe_n), .usb_wr_n(usb_wr_n), .usb_data(usb_data), .locked(locked),
    .n_events(n_events), .n_hits_dropped(n_hits_dropped), .n_trig_dropped(n_trig_dropped),
    .evt_fill(evt_fill));

  tb_usb_host_model #(.BUSY_PCT(10)) u_host (.clk(dut.clk210), .usb_wr_n(usb_wr_n),
    .usb_data(usb_data), .usb_txe_n(usb_txe_n), .word_valid(word_valid), .word(word),
    .protocol_errors(perr), .bytes(nbytes));

  always #6250 clk80 = ~clk80;

  // pulse generator model
  int step = 0;
  always @(posedge trig_out) if (step < N_STEPS) begin
    automatic int d = 1000 + step * STEP_PS;
    step++;
    fork begin #(d); hit_in[0] = 1'b1; #5000; hit_in[0] = 1'b0; end join_none
  end

  // event decoder: one relative bin per event
  int rel [$];
  int fine_seen [16];
  tdc_time_t t_trig;
  int n_in_evt = 0;
  always @(posedge dut.clk210) if (word_valid) begin
    case (word[63:60])
      WT_HEADER: begin t_trig = word[TIME_W-1:0]; n_in_evt = 0; end
      WT_HIT: begin
        hit_word_t h;
        h = word;
        n_in_evt++;
        checks++;
        if (h.ch != 0) begin failures++; $display("hit on channel %0d", h.ch); end
        rel.push_back(int'($signed(h.toa - t_trig)));
        fine_seen[h.toa[3:0]]++;
      end
      default: begin
        checks++;
        if (n_in_evt != 1) begin failures++; $display("event with %0d hits", n_in_evt); end
      end
    endcase
  end

  initial begin
    #100_000 rst_n = 1;
    @(posedge locked);
    repeat (40) @(posedge dut.clk210);
    cal_enable = 1;
    wait (step == N_STEPS);
    @(negedge trig_out);
    cal_enable = 0;
    for (int k = 0; k < 20000 && rel.size() < N_STEPS; k++) @(posedge dut.clk210);
    checks++;
    if (rel.size() != N_STEPS) begin
      failures++; $display("%0d of %0d events read", rel.size(), N_STEPS);
    end else begin
      int run_start, nb;
      for (int i = 1; i < N_STEPS; i++) begin
        checks++;
        if (rel[i] - rel[i-1] < 0 || rel[i] - rel[i-1] > 1) begin
          failures++; $display("step %0d: bin %0d after %0d", i, rel[i], rel[i-1]);
        end
      end
      checks++;
      if (rel[N_STEPS-1] - rel[0] < 20 || rel[N_STEPS-1] - rel[0] > 21) begin
        failures++; $display("scan advanced %0d bins", rel[N_STEPS-1] - rel[0]);
      end
      // widths of the bins entered and left inside the scan
      run_start = -1; nb = 0;
      for (int i = 1; i < N_STEPS; i++) if (rel[i] != rel[i-1]) begin
        if (run_start >= 0) begin
          checks++;
          nb++;
          $display("bin %0d: %0d steps, width %0d ps", rel[i-1] - rel[0], i - run_start, (i - run_start) * STEP_PS);
          if (i - run_start < 14 || i - run_start > 15) begin
            failures++; $display("  width outside 140-150 ps");
          end
        end
        run_start = i;
      end
      checks++;
      if (nb < 19) begin failures++; $display("only %0d whole bins measured", nb); end
    end
    foreach (fine_seen[b]) begin
      checks++;
      if (fine_seen[b] == 0) begin failures++; $display("bin %0d of the period never seen", b); end
    end
    checks++;
    if (perr != 0) begin failures++; $display("USB protocol errors %0d", perr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
