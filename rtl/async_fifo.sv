// async_fifo: dual-clock FIFO that carries event bytes from the 100 MHz system
// clock to the 60 MHz clock of the USB bridge.
//
// Classic design: binary read and write pointers one bit wider than the
// address, exchanged between the clock domains in Gray code through two-stage
// synchronisers. 'full' is computed in the write domain, 'empty' in the read
// domain; both are pessimistic for the two cycles of synchroniser delay, never
// optimistic. The read port is show-ahead: 'rd_data' is the oldest word
// whenever 'empty' is low, and 'rd_en' pops it. Writes while full and reads
// while empty are ignored. Depth is 2**AW words. The board description only
// says the output is a parallel FIFO interface; the depth (2048 bytes, about
// 16 events) and this structure are this design's choices.
`timescale 1ps/1ps
module async_fifo #(
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 11
) (
  input  logic          wr_clk,
  input  logic          wr_rst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          full,
  input  logic          rd_clk,
  input  logic          rd_rst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty
);

  logic [DW-1:0] mem [2**AW];

  logic [AW:0] wptr, wgray, rptr, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic [AW:0] wptr_nxt;
  assign wptr_nxt = wptr + 1'b1;
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wptr     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wptr  <= wptr_nxt;
        wgray <= bin2gray(wptr_nxt);
      end
    end
  end

  // read domain
  logic [AW:0] rptr_nxt;
  assign rptr_nxt = rptr + 1'b1;
  assign empty    = (rgray == wgray_r2);
  assign rd_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rptr     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rptr  <= rptr_nxt;
        rgray <= bin2gray(rptr_nxt);
      end
    end
  end

endmodule
