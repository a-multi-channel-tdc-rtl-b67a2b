// tdc_usb_tx -- sends 64-bit readout words to a USB bridge chip over an 8-bit
// FIFO-style write port.
//
// The document reads the data out through a USB interface without naming the
// device; this design assumes the common synchronous byte-FIFO port of USB 2.0
// bridge chips: the chip drives txe_n low while it can accept a byte, and a byte
// on `data` is taken on every clock edge with wr_n low. Each word is sent as eight
// bytes, least significant byte first. The port is clocked by the 210 MHz system
// clock here; a bridge chip with its own clock needs a clock-domain-crossing FIFO
// in front of this block.
//
// Ports: clk, rst, in_valid/in_word/in_ready (a word is taken when both are high),
// usb_txe_n (input), usb_wr_n, usb_data[7:0]. Throughput: one byte per cycle while
// txe_n is low, so a word takes at least eight cycles.
`timescale 1ps / 1fs
module tdc_usb_tx (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [63:0] in_word,
  output logic        in_ready,
  input  logic        usb_txe_n,
  output logic        usb_wr_n,
  output logic [7:0]  usb_data
);

  logic [63:0] sh;       // word being sent, current byte in [7:0]
  logic [3:0]  left;     // bytes still to send

  assign in_ready = (left == 4'd0);
  assign usb_wr_n = !((left != 4'd0) && !usb_txe_n);
  assign usb_data = sh[7:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      sh   <= '0;
      left <= '0;
    end else if (left == 4'd0) begin
      if (in_valid) begin
        sh   <= in_word;
        left <= 4'd8;
      end
    end else if (!usb_txe_n) begin
      sh   <= {8'h00, sh[63:8]};
      left <= left - 1'b1;
    end
  end

endmodule
