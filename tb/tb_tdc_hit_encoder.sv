// tb_tdc_hit_encoder -- feeds the encoder 32-bit words built from a list of pulses
// (start bin, end bin) and compares its hits with the list: ToA = start bin,
// ToT = end - start, saturated at TOT_MAX with tot_ovf set. The word of cycle n
// covers bins 32n..32n+31 and is presented with coarse = n, so expected times are
// absolute bin numbers. The pulse list has four sections:
//   random widths 1..120 bins with random gaps;
//   a 50 MHz train (one pulse every 134 bins = 20 ns), the document's capture rate,
//     whose hits must come at the same rate;
//   pairs where the second pulse starts in the word in which the first one ends;
//   pulses longer than TOT_MAX (overflow), reported TOT_MAX bins after their
//     leading edge, before they end.
// Hits must appear one cycle after the word that holds the fall (or the overflow
// point): that latency is checked too.
`timescale 1ps / 1fs
module tb_tdc_hit_encoder;
  import tdc_pkg::*;
  localparam int TOT_MAX = 255;
  logic clk = 0, rst;
  logic [31:0] word;
  logic [COARSE_W-1:0] coarse;
  logic hit_valid;
  hit_t hit;
  int checks = 0, failures = 0, n_ovf = 0, n_train = 0, n_pairs = 0;

  tdc_hit_encoder #(.CH(6'd5), .TOT_MAX(TOT_MAX)) dut (
    .clk(clk), .rst(rst), .word(word), .coarse(coarse), .hit_valid(hit_valid), .hit(hit));

  always #1000 clk = ~clk;

  int ps [$], pe [$];      // pulse start / end bins (end = first low bin)
  int exp_cycle [$];       // cycle in which the hit is expected at the output

  function automatic logic level(int b);
    foreach (ps[i]) if (b >= ps[i] && b < pe[i]) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    int b, nwords;
    b = 100;
    for (int i = 0; i < 60; i++) begin       // random
      automatic int w = $urandom_range(1, 120);
      ps.push_back(b); pe.push_back(b + w);
      b += w + $urandom_range(33, 150);
    end
    for (int i = 0; i < 40; i++) begin       // 50 MHz train
      ps.push_back(b); pe.push_back(b + 30);
      b += 134;
      n_train++;
    end
    b = (b / 32 + 2) * 32;
    for (int i = 0; i < 20; i++) begin       // second pulse starts in the word of the first fall
      automatic int f = b + 40 + (i % 20);             // fall somewhere in the word
      ps.push_back(b); pe.push_back(f);
      ps.push_back(f + 2 + (i % 5)); pe.push_back(f + 2 + (i % 5) + 50);
      b = f + 2 + (i % 5) + 50 + 60;
      n_pairs++;
    end
    for (int i = 0; i < 5; i++) begin        // overflow
      automatic int w = 255 + i * 37;
      ps.push_back(b); pe.push_back(b + w);
      b += w + 100;
    end
    nwords = b / 32 + 4;
    // expected output cycle of each hit
    foreach (ps[i]) begin
      automatic int w = pe[i] - ps[i];
      if (w >= TOT_MAX) begin
        // overflow when coarse*32+31 - start >= TOT_MAX
        exp_cycle.push_back((ps[i] + TOT_MAX) / 32);  // first word whose last bin is TOT_MAX past the start
      end else begin
        exp_cycle.push_back(pe[i] / 32);
      end
    end

    rst = 1; word = '0; coarse = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    fork
      for (int n = 0; n < nwords; n++) begin
        logic [31:0] w;
        for (int i = 0; i < 32; i++) w[i] = level(n * 32 + i);
        word   <= w;
        coarse <= COARSE_W'(n);
        @(posedge clk);
      end
      begin
        int k = 0;
        int cyc = 0;   // cycle index relative to the first word
        @(posedge clk);
        while (cyc < nwords + 2) begin
          @(negedge clk);
          if (hit_valid) begin
            if (k >= ps.size()) begin
              failures++; $display("extra hit toa=%0d", hit.toa);
            end else begin
              automatic int w = pe[k] - ps[k];
              automatic logic ovf = (w >= TOT_MAX);
              checks++;
              if (hit.toa !== TIME_W'(ps[k]) || hit.tot !== TOT_W'(ovf ? TOT_MAX : w) ||
                  hit.tot_ovf !== ovf || hit.ch !== 6'd5) begin
                failures++;
                $display("hit %0d: toa=%0d tot=%0d ovf=%b, expected toa=%0d tot=%0d ovf=%b",
                         k, hit.toa, hit.tot, hit.tot_ovf, ps[k], ovf ? TOT_MAX : w, ovf);
              end
              checks++;
              if (cyc != exp_cycle[k]) begin
                failures++;
                $display("hit %0d at cycle %0d, expected %0d", k, cyc, exp_cycle[k]);
              end
              if (ovf) n_ovf++;
            end
            k++;
          end
          @(posedge clk);
          cyc++;
        end
        checks++;
        if (k != ps.size()) begin
          failures++; $display("got %0d hits, expected %0d", k, ps.size());
        end
        checks++;
        if (n_ovf != 5) begin failures++; $display("overflow hits %0d", n_ovf); end
      end
    join
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
