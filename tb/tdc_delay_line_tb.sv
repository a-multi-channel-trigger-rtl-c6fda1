// tdc_delay_line_tb: checks the delay-line model. Edges of 'hit' are placed at
// chosen offsets before a 320 MHz sampling edge; the sample must show the new
// level on exactly floor(offset / 36 ps) + 1 sampled taps (sampled tap i lies
// 4*i carry taps, 36 ps * i, behind the input), and the old level beyond.
`timescale 1ps/1ps
module tdc_delay_line_tb;
  localparam int unsigned NT = 128;
  localparam int unsigned PERIOD = 3125;
  logic clk = 1'b0;
  logic hit = 1'b0;
  logic [NT-1:0] taps;
  int checks = 0, failures = 0;

  tdc_delay_line dut (.clk(clk), .hit(hit), .taps(taps));

  always #(PERIOD/2) clk = ~clk;   // edges at 1562, 3124, ... (period 3124 ps)

  initial begin
    #(2_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_edge(input logic lvl, input int unsigned offset_ps);
    int unsigned n_new;
    logic [NT-1:0] exp;
    // wait for a rising clock edge, then place the hit edge 'offset_ps' before
    // the following one
    @(posedge clk);
    #(2*(PERIOD/2) - offset_ps);
    hit = lvl;
    @(posedge clk);
    #1;
    n_new = offset_ps / 36 + 1;
    if (n_new > NT) n_new = NT;
    for (int unsigned i = 0; i < NT; i++) exp[i] = (i < n_new) ? lvl : ~lvl;
    checks++;
    if (taps !== exp) begin
      failures++;
      $display("FAIL lvl=%0b offset=%0d: taps=%h exp=%h", lvl, offset_ps, taps, exp);
    end
    // the edge must be seen over the whole line one cycle later only if it has
    // crossed it; here just hold the level long enough for the next test
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (taps !== {NT{lvl}}) begin
      failures++;
      $display("FAIL lvl=%0b: line not settled: %h", lvl, taps);
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    check_edge(1'b1, 10);
    check_edge(1'b0, 100);
    check_edge(1'b1, 1000);
    check_edge(1'b0, 3000);
    check_edge(1'b1, 1801);
    check_edge(1'b0, 35);
    for (int k = 0; k < 20; k++) check_edge(k[0] ? 1'b0 : 1'b1, 5 + $urandom_range(0, 3000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
