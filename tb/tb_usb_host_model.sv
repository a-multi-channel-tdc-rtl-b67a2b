// tb_usb_host_model -- model of the USB bridge chip's byte FIFO as seen by the
// FPGA: it lowers txe_n (room for data) at random, BUSY_PCT percent of cycles
// busy, takes a byte on every clock edge with wr_n low, and reassembles the
// 64-bit readout words (least significant byte first), presenting each for one
// cycle on word_valid/word. Counts the cycles in which the FPGA had data waiting
// on a busy chip (stall_cycles) and flags a write while busy (protocol_errors).
`timescale 1ps / 1fs
module tb_usb_host_model #(
  parameter int BUSY_PCT = 30
) (
  input  logic        clk,
  input  logic        usb_wr_n,
  input  logic [7:0]  usb_data,
  output logic        usb_txe_n,
  output logic        word_valid,
  output logic [63:0] word,
  output int          protocol_errors,
  output int          bytes
);
  logic [63:0] acc;
  initial begin
    usb_txe_n = 1; word_valid = 0; word = '0; acc = '0; protocol_errors = 0; bytes = 0;
  end
  always @(posedge clk) begin
    word_valid <= 1'b0;
    if (!usb_wr_n) begin
      if (usb_txe_n) protocol_errors <= protocol_errors + 1;
      acc = {usb_data, acc[63:8]};
      bytes <= bytes + 1;
      if (bytes % 8 == 7) begin
        word_valid <= 1'b1;
        word       <= acc;
      end
    end
    usb_txe_n <= ($urandom_range(0, 99) < BUSY_PCT);
  end
endmodule
