// tdc_channel: edge detection and thermometer decoding of one FPGA TDC channel.
//
// Input is the 128-bit sample of the tapped delay line taken every 320 MHz
// cycle. Tap 0 sees the channel input directly, so an edge that arrived since
// the previous sample shows up as a change of tap 0; the number of sampled
// taps that already carry the new level says how long before the sample the
// edge arrived (one count = four carry taps, about 36 ps). The edge time is
// therefore coarse * T_clk - fine * t_bin, and calibration of t_bin per bin
// (from a bin occupancy histogram) is left to the offline analysis.
//
// Decoding counts the ones (leading edge) or zeros (trailing edge) of the
// whole sample instead of looking for the first transition, which makes it
// insensitive to bubbles in the code. The count is split over two pipeline
// stages (four 32-bit population counts, then their sum) to keep the decoding
// logic fast at 320 MHz.
//
// Pipeline: taps registered (stage 1), partial counts (stage 2), result
// (stage 3). 'rec' and 'lead_pulse' update 3 cycles after the sample that
// first saw the edge. The coarse value stored is 'coarse' as seen in stage 1;
// all channels share one counter, so the fixed offset cancels between them.
// 'rec' keeps the latest leading edge and the first trailing edge after it.
// The board description gives the delay line, the sampling and the 320 MHz
// clock; the ones-counting decoder and this pipeline are this design's choice.
`timescale 1ps/1ps
module tdc_channel
  import trb_pkg::*;
#(
  parameter int unsigned NT = N_TAPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NT-1:0]        taps,
  input  logic [COARSE_W-1:0]  coarse,
  output tdc_rec_t             rec,
  output logic                 lead_pulse,
  output logic                 trail_pulse
);

  localparam int unsigned NG = 4;            // partial count groups
  localparam int unsigned GW = NT / NG;      // taps per group
  localparam int unsigned PW = $clog2(GW + 1);

  // stage 1
  logic [NT-1:0]       s1_taps;
  logic                s1_t0_prev;
  logic [COARSE_W-1:0] s1_coarse;
  // stage 2
  logic [PW-1:0]       s2_part [NG];
  logic                s2_rise, s2_fall;
  logic [COARSE_W-1:0] s2_coarse;

  function automatic logic [PW-1:0] popcount(input logic [GW-1:0] v);
    logic [PW-1:0] n = '0;
    for (int unsigned k = 0; k < GW; k++) n += PW'(v[k]);
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_taps    <= '0;
      s1_t0_prev <= 1'b0;
      s1_coarse  <= '0;
    end else begin
      s1_taps    <= taps;
      s1_t0_prev <= s1_taps[0];
      s1_coarse  <= coarse;
    end
  end

  logic rise_1, fall_1;
  assign rise_1 =  s1_taps[0] & ~s1_t0_prev;
  assign fall_1 = ~s1_taps[0] &  s1_t0_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NG; g++) s2_part[g] <= '0;
      s2_rise   <= 1'b0;
      s2_fall   <= 1'b0;
      s2_coarse <= '0;
    end else begin
      // count the taps that carry the new level: ones after a rising edge,
      // zeros after a falling edge
      for (int g = 0; g < NG; g++)
        s2_part[g] <= popcount(s1_taps[g*GW +: GW] ^ {GW{~s1_taps[0]}});
      s2_rise   <= rise_1;
      s2_fall   <= fall_1;
      s2_coarse <= s1_coarse;
    end
  end

  logic [FINE_W-1:0] fine_2;
  always_comb begin
    fine_2 = '0;
    for (int g = 0; g < NG; g++) fine_2 += FINE_W'(s2_part[g]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec         <= '0;
      lead_pulse  <= 1'b0;
      trail_pulse <= 1'b0;
    end else begin
      lead_pulse  <= s2_rise;
      trail_pulse <= s2_fall & rec.lead_valid & ~rec.trail_valid;
      if (s2_rise) begin
        rec.lead_valid  <= 1'b1;
        rec.lead        <= '{coarse: s2_coarse, fine: fine_2};
        rec.trail_valid <= 1'b0;
      end else if (s2_fall && rec.lead_valid && !rec.trail_valid) begin
        rec.trail_valid <= 1'b1;
        rec.trail       <= '{coarse: s2_coarse, fine: fine_2};
      end
    end
  end

endmodule
