// tdc_calibration_tb: the two standard characterisation runs of a
// delay-line TDC, applied to two channels (delay line model + decoder).
//
// 1. Phase difference: the same pulse goes to channel 0 and, 1.75 ns later,
//    to channel 1, at random phases with respect to the 320 MHz clock. The
//    difference of the measured leading-edge times, t = coarse * 3125 ps -
//    fine * 36 ps, must average to the applied delay within 5 ps. Its RMS,
//    which for two equal channels is sqrt(2) times the single-channel
//    resolution, must stay below the bin width (36 ps); with ideal equal
//    bins the quantisation alone gives at most 18 ps.
// 2. Bin occupancy (code density): randomly timed pulses on channel 0. With
//    equal bins every fine value 1..86 must be equally likely (within 5
//    standard deviations), value 87 holds the remainder of the 3.125 ns
//    period, and no other value may appear. The differential and integral
//    non-linearity derived from the histogram are printed, in bins.
`timescale 1ps/1ps
module tdc_calibration_tb;
  import trb_pkg::*;
  localparam int TCLK = 3125, BIN = 36, DELAY = 1750;
  localparam int N_PAIRS = 2000, N_DENS = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] hit = '0;
  logic [COARSE_W-1:0] coarse = '0;
  logic [N_TAPS-1:0] taps [2];
  tdc_rec_t rec [2];
  logic [1:0] lead_pulse, trail_pulse;

  always begin #1562 clk = 1'b1; #1563 clk = 1'b0; end
  always @(posedge clk) coarse <= coarse + 1;

  for (genvar c = 0; c < 2; c++) begin : g_ch
    tdc_delay_line u_tdl (.clk(clk), .hit(hit[c]), .taps(taps[c]));
    tdc_channel u_ch (.clk(clk), .rst_n(rst_n), .taps(taps[c]), .coarse(coarse),
                      .rec(rec[c]), .lead_pulse(lead_pulse[c]), .trail_pulse(trail_pulse[c]));
  end

  int checks = 0, failures = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(400_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint t_of(input tdc_time_t t);
    return longint'(t.coarse) * TCLK - longint'(t.fine) * BIN;
  endfunction

  // leading-edge times as they are reported
  longint t_lead [2][$];
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++)
      if (rst_n && lead_pulse[c]) t_lead[c].push_back(t_of(rec[c].lead));
  end
  int hist [256];
  always @(posedge clk) if (rst_n && lead_pulse[0]) hist[rec[0].lead.fine]++;

  initial begin
    real sum, sum2, mean, rms, expct, dnl_max, inl, inl_max;
    int n_good;
    for (int i = 0; i < 256; i++) hist[i] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // 1. phase difference between two channels
    for (int k = 0; k < N_PAIRS; k++) begin
      #($urandom_range(20_000, 30_000));
      fork
        begin hit[0] = 1'b1; #(10_000) hit[0] = 1'b0; end
        begin #(DELAY) hit[1] = 1'b1; #(10_000) hit[1] = 1'b0; end
      join
    end
    #(50_000);
    chk(t_lead[0].size() == N_PAIRS && t_lead[1].size() == N_PAIRS,
        $sformatf("edges seen %0d %0d", t_lead[0].size(), t_lead[1].size()));
    sum = 0; sum2 = 0;
    for (int k = 0; k < N_PAIRS; k++) begin
      real d;
      d = real'(t_lead[1][k] - t_lead[0][k]);
      sum += d; sum2 += d * d;
    end
    mean = sum / N_PAIRS;
    rms  = $sqrt(sum2 / N_PAIRS - mean * mean);
    $display("phase difference: mean %0.1f ps (applied %0d ps), RMS %0.1f ps, single channel %0.1f ps",
             mean, DELAY, rms, rms / $sqrt(2.0));
    chk(mean > DELAY - 5 && mean < DELAY + 5, "mean phase difference");
    chk(rms < BIN, "phase difference RMS");

    // 2. code density with randomly timed pulses on channel 0
    for (int i = 0; i < 256; i++) hist[i] = 0;
    for (int k = 0; k < N_DENS; k++) begin
      #($urandom_range(12_000, 15_125));
      hit[0] = 1'b1;
      #(6_000);
      hit[0] = 1'b0;
    end
    #(50_000);
    expct = real'(N_DENS) * BIN / TCLK;
    n_good = 1;
    dnl_max = 0; inl = 0; inl_max = 0;
    for (int b = 1; b <= 86; b++) begin
      real dnl;
      dnl = hist[b] / expct - 1.0;
      inl += dnl;
      if (dnl < 0 ? -dnl > dnl_max : dnl > dnl_max) dnl_max = dnl < 0 ? -dnl : dnl;
      if (inl < 0 ? -inl > inl_max : inl > inl_max) inl_max = inl < 0 ? -inl : inl;
      if (hist[b] < expct - 5 * $sqrt(expct) || hist[b] > expct + 5 * $sqrt(expct)) begin
        n_good = 0;
        $display("bin %0d holds %0d, expected %0.0f", b, hist[b], expct);
      end
    end
    chk(n_good == 1, "uniform bin occupancy");
    chk(hist[0] == 0, "no zero fine count");
    begin
      int extra;
      extra = 0;
      for (int b = 88; b < 256; b++) extra += hist[b];
      chk(extra == 0, "no fine count above 87");
      chk(hist[87] < 3 * expct * (TCLK - 86 * BIN) / BIN + 20, "last bin holds the remainder");
    end
    $display("code density: %0d hits, %0.0f per bin expected, max |DNL| %0.3f bin, max |INL| %0.3f bin",
             N_DENS, expct, dnl_max, inl_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
