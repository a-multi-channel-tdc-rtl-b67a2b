// tb_tdc_core -- a four-channel core (the default is 36) with independent random
// pulse trains on every channel, edges in the middle of bins. Every channel must
// report each of its pulses with its own channel number, ToT = fall bin - rise bin,
// and ToA = rise bin + one common offset: the channels share one time base. The
// offset (one bin plus whole 210 MHz cycles) is taken from the first hit. The
// coarse counter must advance by one per 210 MHz cycle.
`timescale 1ps / 1fs
module tb_tdc_core;
  import tdc_pkg::*;
  localparam int N = 4;
  localparam real T = 2380.952381, TB = T / 16.0;
  logic [7:0] clk_ph;
  logic clk210, rst;
  logic [N-1:0] hit_in, hit_valid;
  logic [COARSE_W-1:0] coarse, coarse_q;
  hit_t hits [N];
  int checks = 0, failures = 0;
  int rb [N][$], fb [N][$];
  int got [N];
  int offset = 0;
  logic have_offset = 0;

  tb_phase_clocks u_clk (.clk_ph(clk_ph), .clk210(clk210));
  tdc_core #(.N(N)) dut (.clk_ph(clk_ph), .clk210(clk210), .rst(rst), .hit_in(hit_in),
                         .coarse(coarse), .hit_valid(hit_valid), .hits(hits));

  always @(posedge clk210) begin
    if (!rst && coarse_q != '0) begin
      checks++;
      if (coarse != coarse_q + 1'b1) begin failures++; $display("coarse %0d after %0d", coarse, coarse_q); end
    end
    coarse_q <= coarse;
    if (!rst) for (int c = 0; c < N; c++) if (hit_valid[c]) begin
      automatic int k = got[c];
      if (!have_offset) begin offset = int'(hits[c].toa) - rb[c][k]; have_offset = 1; end
      checks++;
      if (k >= rb[c].size() || hits[c].ch != CH_W'(c) || int'(hits[c].toa) != rb[c][k] + offset ||
          int'(hits[c].tot) != fb[c][k] - rb[c][k]) begin
        failures++;
        $display("ch %0d hit %0d: ch %0d toa %0d tot %0d", c, k, hits[c].ch, hits[c].toa, hits[c].tot);
      end
      got[c]++;
    end
  end

  for (genvar c = 0; c < N; c++) begin : g_drv
    initial begin
      int b;
      b = 600 + 37 * c;
      for (int i = 0; i < 40; i++) begin
        automatic int w = $urandom_range(1, 200);
        rb[c].push_back(b); fb[c].push_back(b + w);
        b += w + $urandom_range(40, 200);
      end
      hit_in[c] = 0;
      #(20 * T);
      foreach (rb[c][i]) begin
        #((rb[c][i] + 0.5) * TB - $realtime);
        hit_in[c] = 1;
        #((fb[c][i] + 0.5) * TB - $realtime);
        hit_in[c] = 0;
      end
    end
  end

  initial begin
    rst = 1; coarse_q = '0;
    foreach (got[c]) got[c] = 0;
    #(20 * T) rst = 0;
    #(1200 * T);
    for (int c = 0; c < N; c++) begin
      checks++;
      if (got[c] != 40) begin failures++; $display("ch %0d: %0d hits", c, got[c]); end
    end
    checks++;
    if ((offset - 1) % 32 != 0) begin failures++; $display("offset %0d", offset); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
