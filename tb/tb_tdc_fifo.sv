// tb_tdc_fifo -- random writes and reads against a queue model: data order,
// full/empty flags and the count are compared every cycle. Writes to a full
// FIFO and reads from an empty one are not issued (the FIFO asserts on them).
`timescale 1ps / 1fs
module tb_tdc_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  tdc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #500 clk = ~clk;

  initial begin
    rst = 1; wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == D) || count !== model.size()) begin
        failures++;
        $display("cycle %0d: empty=%b full=%b count=%0d model=%0d", i, empty, full, count, model.size());
      end
      if (!empty) begin
        checks++;
        if (rd_data !== model[0]) begin failures++; $display("data %h expected %h", rd_data, model[0]); end
      end
      if (full) n_full++;
      if (empty) n_empty++;
      // bias towards filling in the first half, emptying in the second
      wr_en   = !full && ($urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 70));
      rd_en   = !empty && ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30));
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("full %0d empty %0d", n_full, n_empty); end
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
