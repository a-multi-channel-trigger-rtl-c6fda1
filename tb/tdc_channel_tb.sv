// tdc_channel_tb: drives thermometer codes straight into one TDC channel
// decoder. For each edge the test builds the sample a delay line would give
// (n taps at the new level, a few bubbles optionally flipped inside that run
// and compensated outside it so the count is kept), together with the coarse
// count, and checks: the edge is reported exactly 2 clock edges after the
// sample is presented (3 cycles after the line was sampled), the fine value
// equals n, the coarse value is the one presented with the sample, and the
// trailing edge is paired with the latest leading edge.
`timescale 1ps/1ps
module tdc_channel_tb;
  import trb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_TAPS-1:0] taps = '0;
  logic [COARSE_W-1:0] coarse = '0;
  tdc_rec_t rec;
  logic lead_pulse, trail_pulse;
  int checks = 0, failures = 0;
  int n_lead = 0, n_trail = 0;

  tdc_channel dut (.*);

  always #1562 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && lead_pulse) n_lead++;
    if (rst_n && trail_pulse) n_trail++;
  end

  // present one sample after the next falling clock edge
  task automatic present(input logic [N_TAPS-1:0] t, input logic [COARSE_W-1:0] c);
    @(negedge clk);
    taps   = t;
    coarse = c;
  endtask

  function automatic logic [N_TAPS-1:0] therm(input logic lvl, input int n, input bit bubble);
    logic [N_TAPS-1:0] v;
    for (int i = 0; i < N_TAPS; i++) v[i] = (i < n) ? lvl : ~lvl;
    if (bubble && n > 4 && n < N_TAPS - 4) begin
      v[n-2] = ~lvl;  // bubble inside the run
      v[n+1] = lvl;   // and one beyond it: the count stays n
    end
    return v;
  endfunction

  task automatic do_edge(input logic lvl, input int n, input bit bubble,
                         input logic [COARSE_W-1:0] c, input bit expect_trail);
    int pulses_before;
    pulses_before = lvl ? n_lead : n_trail;
    present(therm(lvl, n, bubble), c);
    present({N_TAPS{lvl}}, c + 1);
    // sample taken at edge k; s2 at k+1; rec at k+2
    @(posedge clk); // k+1
    #1;
    checks++;
    if ((lvl ? n_lead : n_trail) != pulses_before) begin
      failures++; $display("FAIL pulse too early");
    end
    @(posedge clk); // k+2
    #1;
    if (lvl) begin
      checks++;
      if (!lead_pulse || !rec.lead_valid || rec.lead.fine != FINE_W'(n) ||
          rec.lead.coarse != c || rec.trail_valid) begin
        failures++;
        $display("FAIL lead n=%0d c=%0d: pulse=%0b rec=%p", n, c, lead_pulse, rec);
      end
    end else begin
      checks++;
      if (expect_trail) begin
        if (!trail_pulse || !rec.trail_valid || rec.trail.fine != FINE_W'(n) ||
            rec.trail.coarse != c) begin
          failures++;
          $display("FAIL trail n=%0d c=%0d: pulse=%0b rec=%p", n, c, trail_pulse, rec);
        end
      end else if (trail_pulse || rec.trail_valid) begin
        failures++;
        $display("FAIL trail without lead");
      end
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    do_edge(1'b1, 1, 0, 32'd200, 0);
    do_edge(1'b0, 86, 0, 32'd260, 1);
    do_edge(1'b1, 50, 1, 32'hFFFF_FFF0, 0);
    do_edge(1'b0, 17, 1, 32'h0000_0010, 1);
    for (int k = 0; k < 40; k++) begin
      int n1, n2;
      logic [31:0] c;
      n1 = $urandom_range(1, 100);
      n2 = $urandom_range(1, 100);
      c  = $urandom;
      do_edge(1'b1, n1, k[0], c, 0);
      do_edge(1'b0, n2, k[1], c + 32'd50, 1);
    end
    checks++;
    if (n_lead != 42 || n_trail != 42) begin
      failures++; $display("FAIL pulse counts %0d %0d", n_lead, n_trail);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
