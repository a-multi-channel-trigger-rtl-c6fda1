// coincidence_trigger_tb: applies leading-edge pulse patterns to the trigger
// and compares with a reference model kept in the testbench: a channel is
// open for WINDOW cycles after its pulse, a group (tile g of both layers) is
// satisfied when 3 of its 4 channels are open, and a trigger is expected one
// cycle after any group becomes satisfied, unless enable is low or busy is
// high. Directed cases (3 of 4, 4 of 4, 2 of 4, 3 channels spread over
// groups, a pulse that falls out of the window, busy, disabled) come first,
// then random patterns. The trigger must come two clock edges after the
// edge that samples the completing lead pulse: one for the window counters,
// one for the trigger register.
`timescale 1ps/1ps
module coincidence_trigger_tb;
  localparam int unsigned NCH = 16, WINDOW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b1, busy = 1'b0;
  logic [NCH-1:0] lead_pulse = '0;
  logic trig;
  logic [NCH/4-1:0] trig_groups;
  int checks = 0, failures = 0, n_trig = 0;

  coincidence_trigger #(.NCH(NCH), .WINDOW(WINDOW)) dut (.*);

  always #1562 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, evaluated on the values sampled at each rising edge
  int          left [NCH];
  logic [3:0]  ok_prev = '0;
  logic        exp_trig_d = 1'b0;
  logic [3:0]  exp_groups_d = '0, rise_pend = '0, ok_pend = '0;

  function automatic logic [3:0] groups_ok(input int l [NCH]);
    logic [3:0] r;
    for (int g = 0; g < 4; g++) begin
      int n;
      n = (l[2*g] > 0) + (l[2*g+1] > 0) + (l[8+2*g] > 0) + (l[8+2*g+1] > 0);
      r[g] = (n >= 3);
    end
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      logic [3:0] ok;
      // compare the outputs produced at this edge (from last cycle's model)
      checks++;
      if (trig !== exp_trig_d || (exp_trig_d && trig_groups !== exp_groups_d)) begin
        failures++;
        $display("FAIL t=%0t trig=%0b exp=%0b groups=%b exp=%b", $time, trig, exp_trig_d, trig_groups, exp_groups_d);
      end
      if (trig) n_trig++;
      // the trigger register samples enable, busy and the group rise of the
      // previous window update at this edge
      exp_trig_d = enable && !busy && (rise_pend != 0);
      if (exp_trig_d) exp_groups_d = ok_pend;
      // advance the model with the inputs sampled at this edge
      for (int c = 0; c < NCH; c++)
        if (lead_pulse[c]) left[c] = WINDOW; else if (left[c] > 0) left[c]--;
      ok = groups_ok(left);
      rise_pend = ok & ~ok_prev;
      ok_pend   = ok;
      ok_prev = ok;
    end
  end

  task automatic pulse(input logic [NCH-1:0] m);
    @(negedge clk); lead_pulse = m;
    @(negedge clk); lead_pulse = '0;
  endtask

  task automatic gap(input int n);
    repeat (n) @(negedge clk);
  endtask

  int n_expected;

  initial begin
    for (int c = 0; c < NCH; c++) left[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // 3 of 4 in group 0 (channels 0, 1, 8) spread over the window
    pulse(16'h0001); gap(1); pulse(16'h0002); gap(1); pulse(16'h0100); gap(20);
    // 4 of 4 in group 2 (4, 5, 12, 13) at once
    pulse(16'h3030); gap(20);
    // 2 of 4: no trigger
    pulse(16'h0003); gap(20);
    // three channels in three different groups: no trigger
    pulse(16'h0421); gap(20);
    // third pulse arrives after the first window closed: no trigger
    pulse(16'h0040); gap(WINDOW + 2); pulse(16'h0080); gap(1); pulse(16'h4000); gap(20);
    // busy blocks
    busy = 1'b1; pulse(16'h8880); gap(20); busy = 1'b0;
    // disabled blocks
    enable = 1'b0; pulse(16'h0C0C); gap(20); enable = 1'b1;
    checks++;
    if (n_trig != 2) begin failures++; $display("FAIL directed trigger count %0d", n_trig); end
    // random
    for (int k = 0; k < 3000; k++) begin
      logic [NCH-1:0] m;
      m = '0;
      for (int c = 0; c < NCH; c++) if ($urandom_range(0, 19) == 0) m[c] = 1'b1;
      @(negedge clk);
      lead_pulse = m;
      busy = ($urandom_range(0, 9) == 0);
    end
    @(negedge clk); lead_pulse = '0; busy = 1'b0;
    gap(20);
    checks++;
    if (n_trig < 20) begin failures++; $display("FAIL too few random triggers %0d", n_trig); end
    $display("triggers: %0d", n_trig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
