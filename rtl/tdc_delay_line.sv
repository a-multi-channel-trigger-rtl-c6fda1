// tdc_delay_line: behavioural model of the carry-chain tapped delay line of
// one TDC channel. It is not synthesizable: in the FPGA this is a chain of
// 512 carry cells placed in one logic array block, with a register on every
// fourth tap, and the model stands in for that placed structure.
//
// The input 'hit' enters the chain at tap 0 and travels along it, one tap
// every TAP_DELAY_PS picoseconds. At each rising edge of 'clk' (320 MHz) the
// model samples carry tap STEP*i into taps[i], for i = 0 .. TAPS/STEP-1, so a
// sample is a thermometer code: the taps the last edge has already reached
// show the new level, the rest still show the old one. 'taps' changes just
// after the clock edge, like the output of the sampling registers.
//
// From the board description: 512 taps, one in four sampled (128 sampled
// taps), about 9 ps per tap. Assumed here: every tap has the same delay, and
// two edges of 'hit' are never both inside the chain at one sample (a pulse
// lasts longer than the 4.6 ns the chain spans).
`timescale 1ps/1ps
module tdc_delay_line #(
  parameter int unsigned TAPS         = 512,
  parameter int unsigned STEP         = 4,
  parameter int unsigned TAP_DELAY_PS = 9
) (
  input  logic                   clk,
  input  logic                   hit,
  output logic [TAPS/STEP-1:0]   taps
);

  // Times of the two latest edges of 'hit' and the level after the latest.
  realtime t_last;
  realtime t_prev;
  logic    lvl_last;

  initial begin
    t_last   = -1.0e9;
    t_prev   = -2.0e9;
    lvl_last = 1'b0;
    taps     = '0;
  end

  // record real changes only (a simulator may wake this process for other
  // bits of the vector the input is connected to)
  always @(hit) begin
    if (hit != lvl_last) begin
      t_prev   = t_last;
      t_last   = $realtime;
      lvl_last = hit;
    end
  end

  // Level that 'hit' had at time t.
  function automatic logic level_at(realtime t);
    if (t >= t_last)      return lvl_last;
    else if (t >= t_prev) return ~lvl_last;
    else                  return lvl_last;
  endfunction

  always @(posedge clk) begin
    for (int unsigned i = 0; i < TAPS / STEP; i++)
      taps[i] <= level_at($realtime - real'(i * STEP * TAP_DELAY_PS));
  end

endmodule
