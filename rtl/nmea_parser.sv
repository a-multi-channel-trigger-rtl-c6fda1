// nmea_parser: extracts time, date and position from the GPS NMEA stream.
//
// The parser recognises three sentences, GPGGA, GPRMC and GNRMC (GPS and
// GLONASS receivers), and ignores all others. It takes one ASCII character
// per 'valid' strobe. '$' starts a sentence; fields are split at ','; the
// address field selects the sentence type; '*' ends the data and the two hex
// digits after it are compared with the XOR of all characters between '$'
// and '*'. Only a sentence of a recognised type with a correct checksum
// updates 'gps', and 'updated' then pulses for one cycle with its type in
// 'is_rmc'. A '$' in the middle of a sentence restarts parsing.
//
// Fields taken (NMEA 0183 layout):
//   GGA: 1 UTC time, 2 latitude, 3 N/S, 4 longitude, 5 E/W, 6 fix quality
//   RMC: 1 UTC time, 2 status A/V, 3 latitude, 4 N/S, 5 longitude, 6 E/W,
//        9 date
// Numbers are kept as BCD digits with the decimal point dropped: the first 6
// digits of the time (hhmmss), 8 of the latitude (ddmm.mmmm), 9 of the
// longitude (dddmm.mmmm) and 6 of the date (ddmmyy). GGA leaves the date as
// it was. The three sentence names are from the board description; the
// fields kept, the checksum test and the digit formats are this design's
// reading of the NMEA standard.
`timescale 1ps/1ps
module nmea_parser
  import trb_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      valid,
  input  logic [7:0] data,
  output gps_info_t gps,
  output logic      updated,
  output logic      is_rmc
);

  typedef enum logic [2:0] {WAIT_START, BODY, CK_HI, CK_LO} state_t;
  typedef enum logic [1:0] {S_OTHER, S_GGA, S_RMC} sentence_t;

  state_t     state;
  sentence_t  stype;
  logic [4:0] field;
  logic [3:0] ndig;       // digits taken in the current field
  logic [39:0] addr;      // address field, 5 characters
  logic [7:0] csum;
  logic [3:0] rx_csum_hi;
  gps_info_t  tmp;
  logic       tmp_status; // fix quality > 0 / status 'A'

  logic       is_digit;
  logic [3:0] digit;
  logic       is_hex;
  logic [3:0] hexval;

  assign is_digit = (data >= "0") && (data <= "9");
  assign digit    = data[3:0];

  always_comb begin
    is_hex = 1'b1;
    hexval = '0;
    if (data >= "0" && data <= "9")      hexval = data[3:0];
    else if (data >= "A" && data <= "F") hexval = 4'(data - "A" + 8'd10);
    else if (data >= "a" && data <= "f") hexval = 4'(data - "a" + 8'd10);
    else                                 is_hex = 1'b0;
  end

  // Which item of gps_info the current field holds.
  typedef enum logic [2:0] {F_NONE, F_TIME, F_LAT, F_NS, F_LON, F_EW, F_STAT, F_DATE} fkind_t;
  fkind_t fkind;
  always_comb begin
    fkind = F_NONE;
    if (stype == S_GGA) begin
      case (field)
        5'd1: fkind = F_TIME;
        5'd2: fkind = F_LAT;
        5'd3: fkind = F_NS;
        5'd4: fkind = F_LON;
        5'd5: fkind = F_EW;
        5'd6: fkind = F_STAT;
        default: fkind = F_NONE;
      endcase
    end else if (stype == S_RMC) begin
      case (field)
        5'd1: fkind = F_TIME;
        5'd2: fkind = F_STAT;
        5'd3: fkind = F_LAT;
        5'd4: fkind = F_NS;
        5'd5: fkind = F_LON;
        5'd6: fkind = F_EW;
        5'd9: fkind = F_DATE;
        default: fkind = F_NONE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= WAIT_START;
      stype      <= S_OTHER;
      field      <= '0;
      ndig       <= '0;
      addr       <= '0;
      csum       <= '0;
      rx_csum_hi <= '0;
      tmp        <= '0;
      tmp_status <= 1'b0;
      gps        <= '0;
      updated    <= 1'b0;
      is_rmc     <= 1'b0;
    end else begin
      updated <= 1'b0;
      if (valid) begin
        if (data == "$") begin
          state      <= BODY;
          stype      <= S_OTHER;
          field      <= '0;
          ndig       <= '0;
          addr       <= '0;
          csum       <= '0;
          tmp        <= '0;
          tmp_status <= 1'b0;
        end else begin
          case (state)
            BODY: begin
              if (data == "*") begin
                state <= CK_HI;
              end else begin
                csum <= csum ^ data;
                if (data == ",") begin
                  if (field == 0) begin
                    if (addr == "GPGGA")                         stype <= S_GGA;
                    else if (addr == "GPRMC" || addr == "GNRMC") stype <= S_RMC;
                    else                                         stype <= S_OTHER;
                  end
                  if (field != 5'd31) field <= field + 1'b1;
                  ndig <= '0;
                end else if (field == 0) begin
                  addr <= {addr[31:0], data};
                end else begin
                  case (fkind)
                    F_TIME: if (is_digit && ndig < 6) begin
                      tmp.utc_time <= {tmp.utc_time[19:0], digit};
                      ndig <= ndig + 1'b1;
                    end
                    F_DATE: if (is_digit && ndig < 6) begin
                      tmp.utc_date <= {tmp.utc_date[19:0], digit};
                      ndig <= ndig + 1'b1;
                    end
                    F_LAT: if (is_digit && ndig < 8) begin
                      tmp.latitude <= {tmp.latitude[27:0], digit};
                      ndig <= ndig + 1'b1;
                    end
                    F_LON: if (is_digit && ndig < 9) begin
                      tmp.longitude <= {tmp.longitude[31:0], digit};
                      ndig <= ndig + 1'b1;
                    end
                    F_NS:   tmp.lat_hemi <= data;
                    F_EW:   tmp.lon_hemi <= data;
                    F_STAT: tmp_status <= (stype == S_RMC) ? (data == "A")
                                                           : (is_digit && digit != 0);
                    default: ;
                  endcase
                end
              end
            end
            CK_HI: begin
              rx_csum_hi <= hexval;
              state      <= is_hex ? CK_LO : WAIT_START;
            end
            CK_LO: begin
              state <= WAIT_START;
              if (is_hex && {rx_csum_hi, hexval} == csum && stype != S_OTHER) begin
                gps.utc_time  <= tmp.utc_time;
                gps.latitude  <= tmp.latitude;
                gps.lat_hemi  <= tmp.lat_hemi;
                gps.longitude <= tmp.longitude;
                gps.lon_hemi  <= tmp.lon_hemi;
                gps.fix_valid <= tmp_status;
                if (stype == S_RMC) gps.utc_date <= tmp.utc_date;
                updated <= 1'b1;
                is_rmc  <= (stype == S_RMC);
              end
            end
            default: ;
          endcase
        end
      end
    end
  end

endmodule
