// coincidence_trigger: self trigger of the two-layer scintillator telescope.
//
// The detector has two layers of four tiles and two SiPMs per tile. For each
// tile position the four SiPMs of the upper and the lower tile form a group,
// and the trigger fires when at least MAJORITY (3) of the 4 SiPMs of any group
// have fired within the coincidence window: a particle that crosses both
// layers, tolerant to one missing SiPM signal.
//
// Each leading-edge pulse from a TDC channel opens a window of WINDOW cycles
// (a down counter per channel); the group condition is the majority of the
// open windows. 'trig' is a one-cycle pulse on the cycle the condition of any
// group becomes true, and 'trig_groups' shows which groups met it. No trigger
// is issued while 'enable' is low or while 'busy' (the event builder still
// handling the previous trigger) is high; a coincidence that starts during busy
// is lost (dead time). Latency: 'trig' rises two clock edges after the edge
// that samples the lead pulse completing the majority (window counter, then
// trigger register).
//
// Channel numbering (an assumption): channel = layer*8 + tile*2 + sipm. The
// 3-out-of-4 majority between the two layers is from the board description;
// the window length and the dead-time handling are this design's choices.
`timescale 1ps/1ps
module coincidence_trigger
  import trb_pkg::*;
#(
  parameter int unsigned NCH      = N_CH,
  parameter int unsigned WINDOW   = 32,   // cycles of 3.125 ns: 100 ns
  parameter int unsigned MAJORITY = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           enable,
  input  logic           busy,
  input  logic [NCH-1:0] lead_pulse,
  output logic           trig,
  output logic [NCH/4-1:0] trig_groups
);

  localparam int unsigned NGRP = NCH / 4;           // tile positions
  localparam int unsigned WW   = $clog2(WINDOW + 1);

  logic [WW-1:0]   win [NCH];
  logic [NCH-1:0]  open_w;
  logic [NGRP-1:0] grp_ok, grp_ok_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) win[c] <= '0;
    end else begin
      for (int c = 0; c < NCH; c++)
        if (lead_pulse[c])    win[c] <= WW'(WINDOW);
        else if (win[c] != 0) win[c] <= win[c] - 1'b1;
    end
  end

  always_comb begin
    for (int c = 0; c < NCH; c++) open_w[c] = (win[c] != 0);
    for (int g = 0; g < NGRP; g++) begin
      // group g: tile g of the upper layer (channels 2g, 2g+1) and of the
      // lower layer (channels NCH/2+2g, NCH/2+2g+1)
      grp_ok[g] = (3'(open_w[2*g]) + 3'(open_w[2*g+1]) +
                   3'(open_w[NCH/2+2*g]) + 3'(open_w[NCH/2+2*g+1])) >= 3'(MAJORITY);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp_ok_q    <= '0;
      trig        <= 1'b0;
      trig_groups <= '0;
    end else begin
      grp_ok_q <= grp_ok;
      trig     <= enable && !busy && (grp_ok & ~grp_ok_q) != '0;
      if (enable && !busy && (grp_ok & ~grp_ok_q) != '0)
        trig_groups <= grp_ok;
    end
  end

endmodule
