// nmea_parser_tb: feeds NMEA sentences one character at a time and checks the
// decoded fields against values written out by hand from the sentence text.
// The checksum of each sentence is computed here (XOR of the characters
// between '$' and '*'). Covered: GPGGA (time, position, fix quality), GPRMC
// and GNRMC (time, date, status, position), an unrecognised sentence (GPGSV),
// a recognised sentence with a wrong checksum, a sentence cut short by a new
// '$', and GGA leaving the date unchanged.
`timescale 1ps/1ps
module nmea_parser_tb;
  import trb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [7:0] data = '0;
  gps_info_t gps;
  logic updated, is_rmc;
  int checks = 0, failures = 0, n_upd = 0;

  nmea_parser dut (.*);

  always #5000 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && updated) n_upd++;

  task automatic put(input byte c);
    @(negedge clk); valid = 1'b1; data = c;
    @(negedge clk); valid = 1'b0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  // send "$<body>*hh\r\n"; corrupt the checksum when 'bad' is set
  task automatic sentence(input string body, input bit bad);
    byte cs;
    string hx;
    cs = 0;
    for (int i = 0; i < body.len(); i++) cs ^= body[i];
    if (bad) cs ^= 8'h01;
    hx = $sformatf("%02x", cs);
    hx = hx.toupper();
    put("$");
    for (int i = 0; i < body.len(); i++) put(body[i]);
    put("*"); put(hx[0]); put(hx[1]); put(8'h0D); put(8'h0A);
    repeat (3) @(negedge clk);
  endtask

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s: %p", what, gps); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    sentence("GPGGA,123519,4807.0381,N,01131.0002,E,1,08,0.9,545.4,M,46.9,M,,", 0);
    chk(n_upd == 1 && !is_rmc, "GGA update");
    chk(gps.utc_time == 24'h123519, "GGA time");
    chk(gps.latitude == 32'h48070381 && gps.lat_hemi == "N", "GGA latitude");
    chk(gps.longitude == 36'h011310002 && gps.lon_hemi == "E", "GGA longitude");
    chk(gps.fix_valid, "GGA fix");
    chk(gps.utc_date == 24'h0, "GGA leaves date");

    sentence("GNRMC,225446.00,A,7812.3456,N,01530.1234,E,000.5,054.7,191118,020.3,E,A", 0);
    chk(n_upd == 2 && is_rmc, "GNRMC update");
    chk(gps.utc_time == 24'h225446 && gps.utc_date == 24'h191118, "GNRMC time/date");
    chk(gps.latitude == 32'h78123456 && gps.lat_hemi == "N", "GNRMC latitude");
    chk(gps.longitude == 36'h015301234 && gps.lon_hemi == "E", "GNRMC longitude");
    chk(gps.fix_valid, "GNRMC status");

    sentence("GPGSV,3,1,11,03,03,111,00,04,15,270,00,06,01,010,00,13,06,292,00", 0);
    chk(n_upd == 2 && gps.utc_time == 24'h225446, "GPGSV ignored");

    sentence("GPRMC,010203,A,4400.0000,S,00100.0000,W,0.0,0.0,010219,,", 1);
    chk(n_upd == 2 && gps.utc_time == 24'h225446, "bad checksum ignored");

    // cut short by a new sentence
    put("$"); put("G"); put("P"); put("R"); put("M"); put("C"); put(","); put("9");
    sentence("GPRMC,235959.50,V,4400.1200,S,00100.3400,W,0.0,0.0,311219,,", 0);
    chk(n_upd == 3 && is_rmc, "GPRMC update");
    chk(gps.utc_time == 24'h235959 && gps.utc_date == 24'h311219, "GPRMC time/date");
    chk(gps.latitude == 32'h44001200 && gps.lat_hemi == "S", "GPRMC latitude");
    chk(gps.longitude == 36'h001003400 && gps.lon_hemi == "W", "GPRMC longitude");
    chk(!gps.fix_valid, "GPRMC status V");

    sentence("GPGGA,000001,,,,,0,00,,,M,,M,,", 0);
    chk(n_upd == 4 && gps.utc_time == 24'h000001 && !gps.fix_valid, "GGA without fix");
    chk(gps.latitude == 0 && gps.utc_date == 24'h311219, "GGA empty position");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
