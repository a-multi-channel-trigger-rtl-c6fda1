// trb_top_full_tb: one complete acquisition with the firmware at its default
// sizes (9600 baud GPS line, 2048-byte output FIFO, 100 ns coincidence
// window, 800 ns collection time). The GPS model sends one RMC sentence and a
// PPS edge, then a 3-of-4 coincidence is fired on tile 3 and the event record
// is taken from the FT232H port. Checked: sync word, event number, hit and
// time-over-threshold masks, trigger group, GPS time, date, position and fix,
// PPS flag and fine time (10 ns units since the PPS, within 100 ns of the
// value known from the stimulus), the relative leading-edge times and the
// times over threshold of the three channels (within one 36 ps bin).
`timescale 1ps/1ps
module trb_top_full_tb;
  import trb_pkg::*;
  localparam int EVB = 32 + N_CH * 6, BIN = 36, TCLK = 3125;

  logic clk_tdc = 1'b0, clk_sys = 1'b0, clk_ft = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] hit_i = '0;
  logic run_enable = 1'b1, gps_rx = 1'b1, gps_pps = 1'b0, ft_txe_n = 1'b1;
  logic [7:0] ft_data;
  logic ft_wr_n, ft_rd_n, ft_oe_n, ft_siwu_n;
  logic [31:0] trigger_count, event_count, bytes_sent, pps_period;
  logic gps_fix, pps_seen;

  trb_top dut (.*);

  always begin #1562 clk_tdc = 1'b1; #1563 clk_tdc = 1'b0; end
  always #5000 clk_sys = ~clk_sys;
  always #8333 clk_ft  = ~clk_ft;

  int checks = 0, failures = 0;
  byte rx [$];

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(200_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk_ft) ft_txe_n <= ($urandom_range(0, 3) == 0);
  always @(posedge clk_ft) if (rst_n && !ft_wr_n) rx.push_back(ft_data);

  task automatic gps_send(input string body);
    byte cs;
    string s;
    cs = 0;
    for (int i = 0; i < body.len(); i++) cs ^= body[i];
    s = $sformatf("%02x", cs);
    s = {"$", body, "*", s.toupper(), "\r\n"};
    for (int i = 0; i < s.len(); i++) begin
      byte b;
      b = s[i];
      gps_rx = 1'b0; #(104_167_000);
      for (int k = 0; k < 8; k++) begin gps_rx = b[k]; #(104_167_000); end
      gps_rx = 1'b1; #(104_167_000);
    end
  endtask

  function automatic int s16(input byte hi, input byte lo);
    logic signed [15:0] v;
    v = {hi, lo};
    return int'(v);
  endfunction

  initial begin
    int delay [N_CH], width [N_CH];
    logic [N_CH-1:0] mask;
    realtime t_pps, t_fire;
    byte ev [EVB];
    #(50_000);
    rst_n = 1'b1;
    #(50_000);
    gps_send("GPRMC,101530.00,A,7859.1234,N,01155.4321,E,0.5,54.7,120818,,,A");
    chk(gps_fix && dut.gps.utc_time == 24'h101530, "GPS sentence decoded");
    // PPS, then the coincidence 20 us later
    gps_pps = 1'b1; t_pps = $realtime;
    #(1_000_000); gps_pps = 1'b0;
    #(19_000_000);
    mask = 16'h4080 | 16'h8000;   // tile 3: channels 7 (upper), 14 and 15 (lower)
    t_fire = $realtime;
    for (int c = 0; c < N_CH; c++) begin
      delay[c] = $urandom_range(0, 4000);
      width[c] = $urandom_range(15000, 60000);
      if (mask[c]) begin
        automatic int cc = c, d = delay[c], w = width[c];
        fork begin #(d) hit_i[cc] = 1'b1; #(w) hit_i[cc] = 1'b0; end join_none
      end
    end
    wait (rx.size() == EVB);
    #(1_000_000);
    for (int i = 0; i < EVB; i++) ev[i] = rx.pop_front();
    chk(trigger_count == 1 && event_count == 1 && bytes_sent == EVB, "one event");
    chk({ev[0], ev[1]} == EVENT_SYNC, "sync word");
    chk({ev[2], ev[3], ev[4], ev[5]} == 0, "event number");
    begin
      // PPS counter restarts 3 system cycles after the PPS edge and is latched
      // 2-3 system cycles after the trigger, itself about 30 ns after the hits
      int p, exp_p;
      p = {ev[6], ev[7], ev[8], ev[9]};
      exp_p = int'((t_fire - t_pps) / 10_000.0);
      chk(p >= exp_p - 10 && p <= exp_p + 10, $sformatf("PPS fine time %0d expected about %0d", p, exp_p));
    end
    chk({ev[10], ev[11], ev[12]} == 24'h101530 && {ev[13], ev[14], ev[15]} == 24'h120818, "UTC time/date");
    chk({ev[16], ev[17], ev[18], ev[19]} == 32'h78591234 && ev[20] == "N", "latitude");
    chk({ev[21], ev[22], ev[23], ev[24], ev[25]} == 40'h0011554321 && ev[26] == "E", "longitude");
    chk(ev[27] == 8'b1100_1000, $sformatf("flags %b", ev[27]));
    chk({ev[28], ev[29]} == mask && {ev[30], ev[31]} == mask, "masks");
    begin
      int t0;
      t0 = s16(ev[32+6*7], ev[33+6*7]) * TCLK - (int'(ev[34+6*7]) & 255) * BIN;
      for (int c = 0; c < N_CH; c++) begin
        int t, tot, lf;
        if (!mask[c]) continue;
        lf  = int'(ev[34+6*c]) & 255;
        t   = s16(ev[32+6*c], ev[33+6*c]) * TCLK - lf * BIN;
        tot = s16(ev[35+6*c], ev[36+6*c]) * TCLK - ((int'(ev[37+6*c]) & 255) - lf) * BIN;
        chk((t - t0) - (delay[c] - delay[7]) <= BIN && (t - t0) - (delay[c] - delay[7]) >= -BIN,
            $sformatf("ch %0d lead %0d expected %0d", c, t - t0, delay[c] - delay[7]));
        chk(tot - width[c] <= BIN && tot - width[c] >= -BIN,
            $sformatf("ch %0d ToT %0d expected %0d", c, tot, width[c]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
