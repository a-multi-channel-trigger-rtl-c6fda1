// pps_counter_tb: applies pulse-per-second edges at chosen intervals (in
// clock cycles, scaled down from 1 s) and checks that the counter restarts at
// each one: 'last_period' must equal the interval minus one, the count must
// equal the cycles elapsed since the restart, 'pps_pulse' must occur once per
// edge, and the counter must saturate when the PPS stops (8-bit counter).
`timescale 1ps/1ps
module pps_counter_tb;
  logic clk = 1'b0, rst_n = 1'b0, pps = 1'b0;
  logic [7:0] count, last_period;
  logic pps_pulse, pps_seen;
  int checks = 0, failures = 0, n_pulse = 0;

  pps_counter #(.CNT_W(8)) dut (.*);

  always #5000 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && pps_pulse) n_pulse++;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pps_edge();
    @(negedge clk); pps = 1'b1;
    repeat (5) @(negedge clk); pps = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    chk(!pps_seen, "pps_seen before any PPS");
    pps_edge();
    chk(pps_seen, "pps_seen after PPS");
    for (int k = 0; k < 8; k++) begin
      int unsigned per;
      per = $urandom_range(20, 200);
      // the previous edge was raised at a negedge; raise the next one 'per'
      // cycles later (pps_edge already used 5 cycles)
      repeat (per - 5 - 1) @(negedge clk);
      @(negedge clk);
      // restart happened 2.5 cycles after the previous raise
      chk(count == 8'(per - 3), $sformatf("count before edge %0d exp %0d", count, per - 3));
      pps = 1'b1;
      repeat (5) @(negedge clk);
      pps = 1'b0;
      chk(last_period == 8'(per - 1), $sformatf("last_period %0d exp %0d", last_period, per - 1));
      chk(count == 8'(2), $sformatf("count after edge %0d", count));
    end
    chk(n_pulse == 9, $sformatf("pulse count %0d", n_pulse));
    repeat (300) @(negedge clk);
    chk(count == 8'hFF, "saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
