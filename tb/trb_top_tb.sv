// trb_top_tb: end-to-end test of the board firmware. SiPM-like pulses with
// sub-nanosecond offsets drive the 16 hit inputs; a GPS model sends an NMEA
// RMC sentence on the serial line and pulse-per-second edges; an FT232H model
// takes bytes from the USB FIFO port with its TXE# toggled at random. Every
// event record that arrives is decoded and compared with what was fired:
// hit and time-over-threshold masks, the trigger group, the event number,
// GPS time and date, the relative leading-edge times of the channels (within
// one 36 ps bin) and each channel's time over threshold (within one bin).
//
// Reduced sizes to keep the run short: GPS at 10 Mbaud instead of 9600, PPS
// every 50 us, a 16-byte output FIFO (so it fills and stalls the packer).
// Mechanisms counted, each of which must occur at least once: 3-of-4 and
// 4-of-4 coincidences, a 2-of-4 pattern and a pattern spread over groups that
// must not trigger, a coincidence lost to dead time (busy), one ignored while
// the run is disabled, output FIFO full, USB bridge not ready, a GPS sentence
// decoded, a PPS restart, time over threshold measured.
`timescale 1ps/1ps
module trb_top_tb;
  import trb_pkg::*;
  localparam int unsigned BAUD = 10_000_000;
  localparam int unsigned EVB  = 32 + N_CH * 6;
  localparam int          BIN  = 36;   // ps per sampled tap in the delay-line model
  localparam int          TCLK = 3125;

  logic clk_tdc = 1'b0, clk_sys = 1'b0, clk_ft = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] hit_i = '0;
  logic run_enable = 1'b0, gps_rx = 1'b1, gps_pps = 1'b0, ft_txe_n = 1'b1;
  logic [7:0] ft_data;
  logic ft_wr_n, ft_rd_n, ft_oe_n, ft_siwu_n;
  logic [31:0] trigger_count, event_count, bytes_sent, pps_period;
  logic gps_fix, pps_seen;

  trb_top #(.GPS_BAUD(BAUD), .FIFO_AW(4)) dut (.*);

  // 320 MHz with an exact 3125 ps period, 100 MHz, 60 MHz
  always begin #1562 clk_tdc = 1'b1; #1563 clk_tdc = 1'b0; end
  always #5000 clk_sys = ~clk_sys;
  always #8333 clk_ft  = ~clk_ft;

  int checks = 0, failures = 0;
  int n_3of4 = 0, n_4of4 = 0, n_reject = 0, n_dead = 0, n_disabled = 0;
  int n_fifo_full = 0, n_txe_wait = 0, n_tot = 0, n_events = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(400_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- expected events ----------------
  typedef struct {
    logic [N_CH-1:0] mask;
    int              group;
    int              delay [N_CH];
    int              width [N_CH];
    logic [23:0]     utc_time;
    logic [23:0]     utc_date;
  } exp_t;
  exp_t expq [$];
  logic [23:0] cur_time = '0, cur_date = '0;

  // ---------------- USB bridge model ----------------
  byte rx [$];
  always @(negedge clk_ft) ft_txe_n <= ($urandom_range(0, 1) == 0);
  always @(posedge clk_ft) begin
    if (rst_n && !ft_wr_n) begin
      rx.push_back(ft_data);
      if (ft_txe_n) begin checks++; failures++; $display("FAIL write with TXE# high"); end
    end
    if (rst_n && ft_wr_n && ft_txe_n && !dut.fifo_empty) n_txe_wait++;
  end
  always @(posedge clk_sys) if (dut.ev_valid && dut.fifo_full) n_fifo_full++;

  // decode every complete event
  always @(posedge clk_ft) begin
    if (rx.size() >= EVB) begin
      byte ev [EVB];
      for (int i = 0; i < EVB; i++) ev[i] = rx.pop_front();
      check_event(ev);
    end
  end

  function automatic int s16(input byte hi, input byte lo);
    logic signed [15:0] v;
    v = {hi, lo};
    return int'(v);
  endfunction

  task automatic check_event(input byte ev [EVB]);
    exp_t e;
    logic [15:0] lmask, tmask;
    int ref_c, ref_t;
    n_events++;
    if (expq.size() == 0) begin
      chk(0, "event without a trigger");
      return;
    end
    e = expq.pop_front();
    lmask = {ev[28], ev[29]};
    tmask = {ev[30], ev[31]};
    chk({ev[0], ev[1]} == EVENT_SYNC, "sync word");
    chk({ev[2], ev[3], ev[4], ev[5]} == 32'(n_events - 1), "event number");
    chk(lmask == e.mask, $sformatf("hit mask %h expected %h", lmask, e.mask));
    chk(tmask == e.mask, $sformatf("ToT mask %h expected %h", tmask, e.mask));
    chk(ev[27][3:0] == 4'(1 << e.group), $sformatf("trigger group %b", ev[27][3:0]));
    chk(ev[27][7] == 1'b1, "PPS seen flag");
    chk({ev[10], ev[11], ev[12]} == e.utc_time, "UTC time");
    chk({ev[13], ev[14], ev[15]} == e.utc_date, "UTC date");
    ref_c = -1;
    for (int c = 0; c < N_CH; c++) begin
      int rel, lf, tc, tf, t_lead, tot;
      if (!lmask[c]) continue;
      rel = s16(ev[32+6*c], ev[33+6*c]);
      lf  = int'(ev[34+6*c]) & 255;
      tc  = s16(ev[35+6*c], ev[36+6*c]);
      tf  = int'(ev[37+6*c]) & 255;
      t_lead = rel * TCLK - lf * BIN;
      tot    = tc * TCLK - (tf - lf) * BIN;
      if (ref_c < 0) begin ref_c = c; ref_t = t_lead; end
      chk((t_lead - ref_t) - (e.delay[c] - e.delay[ref_c]) <= BIN &&
          (t_lead - ref_t) - (e.delay[c] - e.delay[ref_c]) >= -BIN,
          $sformatf("ch %0d lead time %0d ps vs ch %0d, expected %0d", c, t_lead - ref_t,
                    ref_c, e.delay[c] - e.delay[ref_c]));
      chk(tot - e.width[c] <= BIN && tot - e.width[c] >= -BIN,
          $sformatf("ch %0d ToT %0d ps expected %0d", c, tot, e.width[c]));
      if (tmask[c]) n_tot++;
    end
  endtask

  // ---------------- stimulus ----------------
  // fire the channels in 'mask' with random sub-ns offsets and widths
  task automatic fire(input logic [N_CH-1:0] mask, input int group, input bit expect_event);
    exp_t e;
    e.mask = mask; e.group = group; e.utc_time = cur_time; e.utc_date = cur_date;
    for (int c = 0; c < N_CH; c++) begin
      e.delay[c] = $urandom_range(0, 4000);
      e.width[c] = $urandom_range(15000, 60000);
    end
    if (expect_event) expq.push_back(e);
    for (int c = 0; c < N_CH; c++) begin
      if (mask[c]) begin
        automatic int cc = c;
        automatic int d = e.delay[c], w = e.width[c];
        fork begin
          #(d) hit_i[cc] = 1'b1;
          #(w) hit_i[cc] = 1'b0;
        end join_none
      end
    end
  endtask

  function automatic logic [N_CH-1:0] group_chans(input int g, input int skip);
    logic [N_CH-1:0] m;
    int ch [4];
    ch = '{2*g, 2*g+1, N_CH/2+2*g, N_CH/2+2*g+1};
    m = '0;
    for (int i = 0; i < 4; i++) if (i != skip) m[ch[i]] = 1'b1;
    return m;
  endfunction

  // GPS serial line: one RMC sentence
  task automatic gps_send(input string body);
    byte cs;
    string s;
    int bitc;
    cs = 0;
    for (int i = 0; i < body.len(); i++) cs ^= body[i];
    s = $sformatf("%02x", cs);
    s = {"$", body, "*", s.toupper(), "\r\n"};
    bitc = 1_000_000_000 / BAUD * 1000;   // ps per bit
    for (int i = 0; i < s.len(); i++) begin
      byte b;
      b = s[i];
      gps_rx = 1'b0; #(bitc);
      for (int k = 0; k < 8; k++) begin gps_rx = b[k]; #(bitc); end
      gps_rx = 1'b1; #(bitc);
    end
  endtask

  initial begin
    int trig_before;
    #(20_000);
    rst_n = 1'b1;
    #(20_000);
    // PPS edges every 50 us
    fork
      forever begin
        gps_pps = 1'b1; #(1_000_000); gps_pps = 1'b0; #(49_000_000);
      end
    join_none
    gps_send("GPRMC,101530.00,A,7859.1234,N,01155.4321,E,0.5,54.7,120818,,,A");
    #(2_000_000);
    chk(dut.gps.utc_time == 24'h101530 && dut.gps.utc_date == 24'h120818 && gps_fix,
        "GPS sentence decoded");
    cur_time = 24'h101530; cur_date = 24'h120818;

    // run disabled: a coincidence must not trigger
    fire(group_chans(1, -1), 1, 0);
    #(3_000_000);
    chk(trigger_count == 0, "no trigger while disabled");
    if (trigger_count == 0) n_disabled++;
    run_enable = 1'b1;
    #(1_000_000);

    for (int k = 0; k < 8; k++) begin
      int g, skip;
      g = k % 4;
      skip = (k < 4) ? -1 : $urandom_range(0, 3);
      trig_before = trigger_count;
      fire(group_chans(g, skip), g, 1);
      if (skip < 0) n_4of4++; else n_3of4++;
      // a second coincidence while the first event is still being sent
      if (k == 2 || k == 5) begin
        #(1_100_000);
        fire(group_chans((g + 1) % 4, -1), (g + 1) % 4, 0);
        #(500_000);
        chk(trigger_count == trig_before + 1, "coincidence during busy dropped");
        if (trigger_count == trig_before + 1) n_dead++;
      end
      // an event takes about 5 us to leave through the small FIFO and the
      // throttled bridge; wait for it before the next coincidence
      #(8_000_000);
      chk(trigger_count == trig_before + 1, $sformatf("trigger %0d", k));
    end

    // two of four in a group: no trigger
    trig_before = trigger_count;
    fire(16'h0101, 0, 0);
    #(3_000_000);
    // three channels in three different groups: no trigger
    fire(16'h0214, 0, 0);
    #(3_000_000);
    chk(trigger_count == trig_before, "no trigger on non-coincidences");
    if (trigger_count == trig_before) n_reject++;

    // let the output drain
    #(20_000_000);
    chk(expq.size() == 0, $sformatf("%0d events missing", expq.size()));
    chk(n_events == 8 && event_count == 8, $sformatf("events %0d / %0d", n_events, event_count));
    chk(bytes_sent == 8 * EVB, "bytes sent");
    chk(pps_seen && pps_period == 32'(50_000_000 / 10_000 - 1),
        $sformatf("PPS period %0d", pps_period));

    // every mechanism must have happened
    chk(n_3of4 > 0, "3-of-4 coincidence");
    chk(n_4of4 > 0, "4-of-4 coincidence");
    chk(n_reject > 0, "non-coincidence rejected");
    chk(n_dead > 0, "dead time");
    chk(n_disabled > 0, "run disabled");
    chk(n_fifo_full > 0, "output FIFO full");
    chk(n_txe_wait > 0, "USB bridge not ready");
    chk(n_tot > 0, "time over threshold");
    $display("3of4=%0d 4of4=%0d reject=%0d dead=%0d disabled=%0d fifo_full=%0d txe_wait=%0d tot=%0d events=%0d",
             n_3of4, n_4of4, n_reject, n_dead, n_disabled, n_fifo_full, n_txe_wait, n_tot, n_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
