// ft232h_fifo_if: write side of the parallel FIFO interface to the FTDI FT232H
// USB bridge, which carries the event data to the host at up to 60 MB/s.
//
// The FT232H in its synchronous FIFO mode supplies a 60 MHz clock (CLKOUT,
// here 'clk') and takes one byte per rising edge on which both TXE# (its
// transmit FIFO has room) and WR# (driven by the FPGA) are low. This block
// keeps the next byte in an output register filled from the show-ahead event
// FIFO, and drives WR# low whenever it holds a byte and TXE# is low, so one
// byte moves on every clock while the bridge accepts them: 60 MHz x 8 bit =
// 60 MB/s. WR# is a combinational function of TXE# so a byte is never offered
// on an edge where TXE# is high. Only the transmit direction is used: RD#, OE#
// and SIWU# stay high. 'bytes_sent' counts the bytes handed over. An
// assertion checks that WR# is never low while TXE# is high. The 60 MB/s
// parallel FIFO link to the FT232H is from the board description; the
// handshake follows the FT232H synchronous FIFO mode, and the rest is this
// design's choice.
`timescale 1ps/1ps
module ft232h_fifo_if (
  input  logic        clk,        // FT232H CLKOUT, 60 MHz
  input  logic        rst_n,
  // show-ahead FIFO holding the event bytes
  input  logic [7:0]  fifo_data,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  // FT232H pins
  input  logic        ft_txe_n,
  output logic [7:0]  ft_data,
  output logic        ft_wr_n,
  output logic        ft_rd_n,
  output logic        ft_oe_n,
  output logic        ft_siwu_n,
  output logic [31:0] bytes_sent
);

  logic       hold_valid;
  logic [7:0] hold_data;
  logic       take;

  assign take      = hold_valid && !ft_txe_n;
  assign ft_wr_n   = !take;
  assign ft_data   = hold_data;
  assign ft_rd_n   = 1'b1;
  assign ft_oe_n   = 1'b1;
  assign ft_siwu_n = 1'b1;
  assign fifo_rd   = (!hold_valid || take) && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_valid <= 1'b0;
      hold_data  <= '0;
      bytes_sent <= '0;
    end else begin
      if (take) bytes_sent <= bytes_sent + 1'b1;
      if (fifo_rd) begin
        hold_valid <= 1'b1;
        hold_data  <= fifo_data;
      end else if (take) begin
        hold_valid <= 1'b0;
      end
    end
  end

  // handshake rule of the bridge: never strobe WR# while TXE# is high
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    !(!ft_wr_n && ft_txe_n));

endmodule
