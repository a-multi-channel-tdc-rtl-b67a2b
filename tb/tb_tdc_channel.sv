// tb_tdc_channel -- a whole channel driven by picosecond-timed pulses. Each edge is
// placed in the middle of a 148.8 ps bin (edge at (b + 0.5) * T/16 from the first
// 0-degree edge), so its bin is known exactly. The hits must give ToT = fall bin
// - rise bin, and ToA = rise bin + a constant offset, taken from the first hit:
// one bin (an edge in the middle of bin b is first seen by the sample that closes
// bin b) plus a whole number of 210 MHz cycles (32 bins) of pipeline.
// Pulses: random widths and gaps, a 50 MHz train (20 ns period, the document's
// capture rate) and two pulses longer than TOT_MAX (overflow).
`timescale 1ps / 1fs
module tb_tdc_channel;
  import tdc_pkg::*;
  localparam real T = 2380.952381, TB = T / 16.0;
  logic [7:0] clk_ph;
  logic clk210, rst, hit_in, hit_valid;
  logic [COARSE_W-1:0] coarse;
  hit_t hit;
  int checks = 0, failures = 0, n_ovf = 0, n_train = 0;
  int rb [$], fb [$];

  tb_phase_clocks u_clk (.clk_ph(clk_ph), .clk210(clk210));
  tdc_channel #(.CH(6'd9)) dut (.clk_ph(clk_ph), .clk210(clk210), .rst(rst), .hit_in(hit_in),
                               .coarse(coarse), .hit_valid(hit_valid), .hit(hit));

  always @(posedge clk210) coarse <= rst ? '0 : coarse + 1'b1;

  int k = 0, offset = 0;
  always @(posedge clk210) if (!rst && hit_valid) begin
    int w;
    w = fb[k] - rb[k];
    if (k == 0) begin
      offset = int'(hit.toa) - rb[0];
      checks++;
      if ((offset - 1) % 32 != 0) begin failures++; $display("offset %0d not whole cycles", offset); end
    end
    checks++;
    if (int'(hit.toa) != rb[k] + offset || hit.ch != 6'd9 ||
        hit.tot != TOT_W'(w >= 255 ? 255 : w) || hit.tot_ovf != (w >= 255)) begin
      failures++;
      $display("hit %0d: toa %0d tot %0d ovf %b, expected toa %0d tot %0d", k, hit.toa, hit.tot,
               hit.tot_ovf, rb[k] + offset, w);
    end
    if (hit.tot_ovf) n_ovf++;
    k++;
  end

  initial begin
    int b;
    b = 600;   // after reset
    for (int i = 0; i < 40; i++) begin
      automatic int w = $urandom_range(1, 160);
      rb.push_back(b); fb.push_back(b + w);
      b += w + $urandom_range(40, 200);
    end
    for (int i = 0; i < 30; i++) begin
      rb.push_back(b); fb.push_back(b + 40);
      b += 134;                  // 134 bins = 19.95 ns
      n_train++;
    end
    for (int i = 0; i < 2; i++) begin
      rb.push_back(b); fb.push_back(b + 300 + 50 * i);
      b += 600;
    end
    rst = 1; hit_in = 0;
    #(20 * T) rst = 0;
    foreach (rb[i]) begin
      #((rb[i] + 0.5) * TB - $realtime);
      hit_in = 1;
      #((fb[i] + 0.5) * TB - $realtime);
      hit_in = 0;
    end
    #(40 * T);
    checks++;
    if (k != rb.size()) begin failures++; $display("%0d hits, expected %0d", k, rb.size()); end
    checks++;
    if (n_ovf != 2) begin failures++; $display("%0d overflows", n_ovf); end
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
