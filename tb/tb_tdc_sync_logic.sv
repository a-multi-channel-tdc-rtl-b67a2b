// tb_tdc_sync_logic -- drives the sixteen sample bits as the sampling flip-flops
// would (bit k of 420 MHz period n changes 10 ps after n*T + k*T/16) with a random
// pattern per period, and checks every 210 MHz output word. Expected, from the
// stage count: the word taken at the clk210 edge at 2jT is
// {pattern[2j-3], pattern[2j-4]}, i.e. a fixed latency and both halves in order.
`timescale 1ps / 1fs
module tb_tdc_sync_logic;
  localparam real T = 2380.952381;
  localparam int  NPER = 400;
  logic [7:0]  clk_ph;
  logic        clk210;
  logic [15:0] smp;
  logic [31:0] word;
  logic [15:0] pat [NPER];
  int checks = 0, failures = 0;

  tb_phase_clocks u_clk (.clk_ph(clk_ph), .clk210(clk210));
  tdc_sync_logic dut (.clk_ph(clk_ph), .clk210(clk210), .smp(smp), .word(word));

  initial begin
    foreach (pat[n]) pat[n] = 16'($urandom);
    smp = '0;
  end

  for (genvar k = 0; k < 16; k++) begin : g_drv
    initial begin
      #(k * T / 16.0 + 10.0);
      for (int n = 0; n < NPER; n++) begin
        smp[k] = pat[n][k];
        #(T);
      end
    end
  end

  initial begin
    for (int j = 3; j < NPER / 2 - 1; j++) begin
      #(2.0 * j * T + 50.0 - $realtime);   // just after the clk210 edge at 2jT
      checks++;
      if (word !== {pat[2*j-3], pat[2*j-4]}) begin
        failures++;
        if (failures < 10) $display("edge %0d: word %h expected %h", j, word, {pat[2*j-3], pat[2*j-4]});
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
