// event_builder_tb: sets up channel records (leading and trailing edge
// times, some inside and some outside the acceptance window around the
// trigger), GPS information and a running PPS counter, fires a trigger and
// collects the 128-byte event from the output port while 'out_ready' is
// toggled at random (FIFO stalls). The expected record is built here byte by
// byte from the same inputs. Also checked: 'busy' is high from the cycle after
// the trigger until the event has been handed out, a second trigger during
// busy produces no event, the event number counts up, and the PPS counter
// value is the one 2 to 4 system cycles after the trigger.
`timescale 1ps/1ps
module event_builder_tb;
  import trb_pkg::*;
  localparam int unsigned NCH = 16, COLLECT = 32, PRE = 8, EVB = 32 + NCH * 6;
  logic clk_tdc = 1'b0, clk_sys = 1'b0, rst_tdc_n = 1'b0, rst_sys_n = 1'b0;
  logic trig = 1'b0;
  logic [3:0] trig_groups = '0;
  logic [COARSE_W-1:0] coarse = 32'hFFFF_FF00;
  tdc_rec_t recs [NCH];
  logic busy;
  logic [31:0] pps_count = '0;
  logic pps_seen = 1'b1;
  gps_info_t gps = '0;
  logic [7:0] out_data;
  logic out_valid, out_ready = 1'b1;
  logic [31:0] event_count;
  int checks = 0, failures = 0;
  byte got [$];
  int n_stall = 0;

  event_builder #(.NCH(NCH), .COLLECT(COLLECT), .PRE(PRE)) dut (.*);

  always #1562 clk_tdc = ~clk_tdc;
  always #5000 clk_sys = ~clk_sys;

  initial begin
    #(100_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk_tdc) coarse <= coarse + 1;
  always @(negedge clk_sys) begin
    pps_count <= pps_count + 1;
    out_ready <= ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk_sys) begin
    if (rst_sys_n && out_valid && out_ready) got.push_back(out_data);
    if (rst_sys_n && out_valid && !out_ready) n_stall++;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic one_event(input int evnum);
    logic [31:0] c_trig, pps_at_trig;
    byte exp [EVB];
    logic [15:0] lmask, tmask;
    int rel [NCH];
    // inputs
    gps.utc_time  = 24'($urandom); gps.utc_date = 24'($urandom);
    gps.latitude  = $urandom;      gps.lat_hemi = "N";
    gps.longitude = {4'($urandom), 32'($urandom)}; gps.lon_hemi = "W";
    gps.fix_valid = 1'($urandom);
    @(negedge clk_tdc);
    #1;
    c_trig = coarse;  // value the builder samples with 'trig'
    lmask = '0; tmask = '0;
    for (int c = 0; c < NCH; c++) begin
      rel[c] = $urandom_range(0, 99) - 50;   // -50 .. 49 cycles around the trigger
      recs[c].lead_valid  = ($urandom_range(0, 3) != 0);
      recs[c].lead.coarse = c_trig + 32'(rel[c]);
      recs[c].lead.fine   = FINE_W'($urandom_range(0, 128));
      recs[c].trail_valid = 1'($urandom);
      recs[c].trail.coarse = recs[c].lead.coarse + 32'($urandom_range(1, 300));
      recs[c].trail.fine  = FINE_W'($urandom_range(0, 128));
      if (recs[c].lead_valid && rel[c] >= -int'(PRE) && rel[c] <= int'(COLLECT)) begin
        lmask[c] = 1'b1;
        if (recs[c].trail_valid) tmask[c] = 1'b1;
      end
    end
    trig_groups = 4'($urandom);
    trig = 1'b1;
    @(negedge clk_tdc);
    trig = 1'b0;
    pps_at_trig = pps_count;
    chk(busy, "busy after trigger");
    // a second trigger while busy must be ignored
    repeat (5) @(negedge clk_tdc);
    trig = 1'b1; @(negedge clk_tdc); trig = 1'b0;
    // wait for the event
    got.delete();
    wait (got.size() == EVB);
    repeat (30) @(negedge clk_tdc);
    chk(!busy, "busy released");
    chk(got.size() == EVB, "no extra bytes");
    chk(event_count == 32'(evnum + 1), "event count");
    // expected record
    {exp[0], exp[1]} = EVENT_SYNC;
    {exp[2], exp[3], exp[4], exp[5]} = 32'(evnum);
    {exp[10], exp[11], exp[12]} = gps.utc_time;
    {exp[13], exp[14], exp[15]} = gps.utc_date;
    {exp[16], exp[17], exp[18], exp[19]} = gps.latitude;
    exp[20] = gps.lat_hemi;
    {exp[21], exp[22], exp[23], exp[24], exp[25]} = {4'h0, gps.longitude};
    exp[26] = gps.lon_hemi;
    exp[27] = {pps_seen, gps.fix_valid, 2'b00, trig_groups};
    {exp[28], exp[29]} = lmask;
    {exp[30], exp[31]} = tmask;
    for (int c = 0; c < NCH; c++) begin
      logic [15:0] tot;
      tot = 16'(recs[c].trail.coarse - recs[c].lead.coarse);
      if (lmask[c])
        {exp[32+6*c], exp[33+6*c], exp[34+6*c], exp[35+6*c], exp[36+6*c], exp[37+6*c]} =
          {16'(rel[c]), recs[c].lead.fine, tmask[c] ? tot : 16'h0, tmask[c] ? recs[c].trail.fine : 8'h0};
      else
        {exp[32+6*c], exp[33+6*c], exp[34+6*c], exp[35+6*c], exp[36+6*c], exp[37+6*c]} = '0;
    end
    for (int i = 0; i < EVB; i++) begin
      if (i >= 6 && i <= 9) continue;
      chk(got[i] == exp[i], $sformatf("event %0d byte %0d: %h expected %h", evnum, i, got[i], exp[i]));
    end
    begin
      logic [31:0] p;
      p = {got[6], got[7], got[8], got[9]};
      chk(p >= pps_at_trig + 1 && p <= pps_at_trig + 4,
          $sformatf("pps latch %0d, trigger at %0d", p, pps_at_trig));
    end
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) recs[c] = '0;
    repeat (3) @(negedge clk_sys);
    rst_tdc_n = 1'b1; rst_sys_n = 1'b1;
    repeat (5) @(negedge clk_sys);
    for (int e = 0; e < 12; e++) one_event(e);
    chk(n_stall > 0, "output stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
