// tb_tdc_sampling_ffs -- checks that each of the sixteen sampling flip-flops takes
// the input level at its own instant k*T/16 of the 420 MHz period. The input is a
// random waveform that changes at random picosecond times; the expected sample of
// bit k in period n is the waveform's level at n*T + k*T/16, worked out from the
// list of change times. Checked 100 ps after the last sampling instant.
`timescale 1ps / 1fs
module tb_tdc_sampling_ffs;
  localparam real T = 2380.952381;
  logic [7:0]  clk_ph;
  logic        clk210;
  logic        hit_in;
  logic [15:0] smp;
  int checks = 0, failures = 0;

  tb_phase_clocks u_clk (.clk_ph(clk_ph), .clk210(clk210));
  tdc_sampling_ffs dut (.clk_ph(clk_ph), .hit_in(hit_in), .smp(smp));

  localparam int NPER = 200;
  real  tchg [$];   // times of level changes, level starts 0
  function automatic logic level_at(real t);
    logic l = 1'b0;
    foreach (tchg[i]) if (tchg[i] <= t) l = ~l;
    return l;
  endfunction

  initial begin
    real t;
    hit_in = 1'b0;
    // random changes, kept at least 20 ps away from every sampling instant
    t = 500.0;
    while (t < NPER * T) begin
      real frac;
      t = t + 40.0 + real'($urandom_range(0, 900));
      frac = t - T / 16.0 * $floor(t / (T / 16.0));
      if (frac > 20.0 && frac < T / 16.0 - 20.0) tchg.push_back(t);
    end
    fork
      begin
        real now = 0.0;
        foreach (tchg[i]) begin
          #(tchg[i] - now);
          now = tchg[i];
          hit_in = ~hit_in;
        end
      end
    join_none
    for (int n = 1; n < NPER - 1; n++) begin
      #(n * T + 15.0 * T / 16.0 + 100.0 - $realtime);
      for (int k = 0; k < 16; k++) begin
        logic exp_l;
        exp_l = level_at(n * T + k * T / 16.0);
        checks++;
        if (smp[k] !== exp_l) begin
          failures++;
          if (failures < 10) $display("period %0d bit %0d: got %b expected %b", n, k, smp[k], exp_l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NPER * T * 2.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
