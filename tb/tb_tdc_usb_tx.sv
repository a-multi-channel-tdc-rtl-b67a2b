// tb_tdc_usb_tx -- random 64-bit words offered with random gaps while a model of
// the USB bridge chip lowers txe_n at random. The bytes written (wr_n low while
// txe_n low) are reassembled LSB first and compared with the words offered; a
// write while txe_n is high is an error. With txe_n held low a word must take
// exactly eight cycles.
`timescale 1ps / 1fs
module tb_tdc_usb_tx;
  logic clk = 0, rst;
  logic in_valid, in_ready, usb_txe_n, usb_wr_n;
  logic [63:0] in_word;
  logic [7:0]  usb_data;
  logic [63:0] sent [$];
  logic [63:0] acc;
  int nbytes = 0, checks = 0, failures = 0, nwords = 0;
  logic free_run = 0;
  int   free_cycles = 0;

  tdc_usb_tx dut (.*);
  always #500 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (!usb_wr_n) begin
      checks++;
      if (usb_txe_n) begin failures++; $display("write while txe_n high"); end
      acc = {usb_data, acc[63:8]};
      nbytes++;
      if (nbytes == 8) begin
        nbytes = 0;
        checks++;
        if (sent.size() == 0 || acc !== sent[0]) begin failures++; $display("word %h", acc); end
        else void'(sent.pop_front());
        nwords++;
      end
    end
    if (free_run) free_cycles++;
  end

  initial begin
    rst = 1; in_valid = 0; in_word = '0; usb_txe_n = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      usb_txe_n = ($urandom_range(0, 3) == 0);
      if (!in_valid || in_ready) begin end
      @(posedge clk);
      if (in_valid && in_ready) in_valid <= 0;
      if ((!in_valid || in_ready) && $urandom_range(0, 5) == 0) begin
        logic [63:0] w;
        w = {$urandom, $urandom};
        in_valid <= 1; in_word <= w; sent.push_back(w);
      end
    end
    @(negedge clk); usb_txe_n = 0;
    // a word still offered is held until the sender takes it
    while (in_valid) begin @(posedge clk); if (in_ready) in_valid <= 0; end
    repeat (20) @(posedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d words not sent", sent.size()); end
    // rate: one word with txe_n low throughout
    @(negedge clk); in_valid = 1; in_word = 64'h0123_4567_89AB_CDEF; sent.push_back(in_word);
    @(posedge clk); #1; in_valid = 0; free_run = 1;
    wait (sent.size() == 0);
    @(negedge clk); free_run = 0;
    checks++;
    if (free_cycles != 8) begin failures++; $display("word took %0d cycles", free_cycles); end
    $display("words %0d", nwords);
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
