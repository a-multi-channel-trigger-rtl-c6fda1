// event_builder: turns a trigger into one event record for the host.
//
// The block spans two clock domains.
//  * TDC domain (320 MHz): on 'trig' it notes the coarse time of the trigger,
//    raises 'busy' (which holds off further triggers) and waits COLLECT cycles
//    so that the trailing edges of the pulses that made the trigger are in.
//    It then freezes a snapshot of the 16 channels: a channel is a hit if its
//    latest leading edge lies between PRE cycles before and COLLECT cycles
//    after the trigger; it has a time over threshold if a trailing edge
//    followed that leading edge. The snapshot stays frozen until the system
//    domain acknowledges it.
//  * System domain (100 MHz): a toggle sent at the trigger latches the PPS
//    fine counter and the latest GPS information 2-3 system cycles after the
//    trigger (a fixed delay of 20-30 ns). A second toggle, sent when the
//    snapshot is frozen, starts the packing: the 128-byte record below is
//    handed out one byte per cycle on a valid/ready port ('out_ready' low
//    stalls it, e.g. when the output FIFO is full). After the last byte the
//    acknowledge toggle returns to the TDC domain, which drops 'busy'.
// Both toggles and the acknowledge pass two-stage synchronisers; the
// snapshot and trigger data they guard are stable while they are read. An
// assertion checks the output rule: an offered byte stays, unchanged, until
// 'out_ready' takes it.
//
// Event record, bytes in order, multi-byte fields most significant first:
//    0- 1  sync word EB90 (hex)
//    2- 5  event number (counts from 0 after reset)
//    6- 9  PPS fine counter at the trigger (10 ns units since the last PPS)
//   10-12  UTC time hhmmss (BCD)      13-15  UTC date ddmmyy (BCD)
//   16-19  latitude ddmmmmmm (BCD)    20     'N' or 'S'
//   21-25  longitude dddmmmmmm (BCD, upper 4 bits zero)    26  'E' or 'W'
//   27     {pps_seen, gps fix valid, 2'b00, groups that fired the trigger}
//   28-29  leading-edge hit mask (bit = channel)
//   30-31  trailing-edge mask (channels with a time over threshold)
//   32-127 16 channels x 6 bytes: leading coarse time relative to the trigger
//          (signed, 3.125 ns units), leading fine count, time over threshold
//          in coarse units (trailing minus leading coarse), trailing fine count.
// The time over threshold is (tot_coarse) x 3.125 ns + (lead_fine -
// trail_fine) x t_bin. What goes into an event (GPS time, PPS time, each
// channel's time over threshold) follows the board description; the record
// layout, COLLECT, PRE and the handshakes are this design's own.
`timescale 1ps/1ps
module event_builder
  import trb_pkg::*;
#(
  parameter int unsigned NCH     = N_CH,
  parameter int unsigned COLLECT = 256,  // TDC cycles waited after the trigger: 800 ns
  parameter int unsigned PRE     = 64    // TDC cycles a leading edge may precede the trigger
) (
  // TDC domain
  input  logic                  clk_tdc,
  input  logic                  rst_tdc_n,
  input  logic                  trig,
  input  logic [NCH/4-1:0]      trig_groups,
  input  logic [COARSE_W-1:0]   coarse,
  input  tdc_rec_t              recs [NCH],
  output logic                  busy,
  // system domain
  input  logic                  clk_sys,
  input  logic                  rst_sys_n,
  input  logic [31:0]           pps_count,
  input  logic                  pps_seen,
  input  gps_info_t             gps,
  output logic [7:0]            out_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [31:0]           event_count
);

  localparam int unsigned HDR_BYTES = 32;
  localparam int unsigned CH_BYTES  = 6;
  localparam int unsigned EV_BYTES  = HDR_BYTES + NCH * CH_BYTES;
  localparam int unsigned CW        = $clog2(COLLECT + 1);

  // ---------------- TDC domain ----------------
  typedef enum logic [1:0] {T_IDLE, T_COLLECT, T_WAIT_ACK} tstate_t;
  tstate_t               tstate;
  logic [CW-1:0]         tcnt;
  logic [COARSE_W-1:0]   trig_coarse;
  logic [NCH/4-1:0]      grp_q;
  logic                  trig_tgl, req_tgl;
  logic [1:0]            ack_sync;
  logic                  ack_tgl;     // system domain, declared here for the TDC side

  // frozen snapshot
  logic [NCH-1:0]        snap_lead, snap_trail;
  logic [CH_BYTES*8-1:0] snap_ch [NCH];

  assign busy = (tstate != T_IDLE);

  always_ff @(posedge clk_tdc or negedge rst_tdc_n) begin
    if (!rst_tdc_n) begin
      tstate      <= T_IDLE;
      tcnt        <= '0;
      trig_coarse <= '0;
      grp_q       <= '0;
      trig_tgl    <= 1'b0;
      req_tgl     <= 1'b0;
      ack_sync    <= '0;
      snap_lead   <= '0;
      snap_trail  <= '0;
      for (int c = 0; c < NCH; c++) snap_ch[c] <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack_tgl};
      case (tstate)
        T_IDLE: if (trig) begin
          trig_coarse <= coarse;
          grp_q       <= trig_groups;
          trig_tgl    <= ~trig_tgl;
          tcnt        <= '0;
          tstate      <= T_COLLECT;
        end
        T_COLLECT: if (tcnt != CW'(COLLECT - 1)) begin
          tcnt <= tcnt + 1'b1;
        end else begin
          for (int c = 0; c < NCH; c++) begin
            logic signed [COARSE_W-1:0] rel;
            logic                       in_win;
            rel    = signed'(recs[c].lead.coarse - trig_coarse);
            in_win = recs[c].lead_valid && rel >= -signed'(COARSE_W'(PRE))
                                        && rel <=  signed'(COARSE_W'(COLLECT));
            snap_lead[c]  <= in_win;
            snap_trail[c] <= in_win && recs[c].trail_valid;
            snap_ch[c]    <= in_win ?
              {rel[15:0], recs[c].lead.fine,
               16'(recs[c].trail.coarse - recs[c].lead.coarse) & {16{recs[c].trail_valid}},
               recs[c].trail.fine & {FINE_W{recs[c].trail_valid}}} : '0;
          end
          req_tgl <= ~req_tgl;
          tstate  <= T_WAIT_ACK;
        end
        T_WAIT_ACK: if (ack_sync[1] == req_tgl) tstate <= T_IDLE;
        default: tstate <= T_IDLE;
      endcase
    end
  end

  // ---------------- system domain ----------------
  logic [2:0]            trig_sync, req_sync;
  logic [31:0]           pps_lat;
  logic                  pps_seen_lat;
  gps_info_t             gps_lat;
  logic [EV_BYTES*8-1:0] ev;
  logic [$clog2(EV_BYTES+1)-1:0] nleft;

  function automatic logic [EV_BYTES*8-1:0] pack_event(
      input logic [31:0] evnum, input logic [31:0] pps, input logic pseen,
      input gps_info_t g, input logic [NCH/4-1:0] grp,
      input logic [NCH-1:0] lmask, input logic [NCH-1:0] tmask);
    logic [EV_BYTES*8-1:0] v;
    v = '0;
    v[EV_BYTES*8-1 -: HDR_BYTES*8] = {EVENT_SYNC, evnum, pps,
        g.utc_time, g.utc_date, g.latitude, g.lat_hemi,
        4'h0, g.longitude, g.lon_hemi,
        pseen, g.fix_valid, 2'b00, 4'(grp),
        16'(lmask), 16'(tmask)};
    for (int c = 0; c < NCH; c++)
      v[(NCH-1-c)*CH_BYTES*8 +: CH_BYTES*8] = snap_ch[c];
    return v;
  endfunction

  always_ff @(posedge clk_sys or negedge rst_sys_n) begin
    if (!rst_sys_n) begin
      trig_sync    <= '0;
      req_sync     <= '0;
      ack_tgl      <= 1'b0;
      pps_lat      <= '0;
      pps_seen_lat <= 1'b0;
      gps_lat      <= '0;
      ev           <= '0;
      nleft        <= '0;
      event_count  <= '0;
    end else begin
      trig_sync <= {trig_sync[1:0], trig_tgl};
      req_sync  <= {req_sync[1:0], req_tgl};
      if (trig_sync[2] != trig_sync[1]) begin
        pps_lat      <= pps_count;
        pps_seen_lat <= pps_seen;
        gps_lat      <= gps;
      end
      if (nleft == 0) begin
        if (req_sync[2] != req_sync[1]) begin
          ev    <= pack_event(event_count, pps_lat, pps_seen_lat, gps_lat,
                              grp_q, snap_lead, snap_trail);
          nleft <= ($bits(nleft))'(EV_BYTES);
        end
      end else if (out_ready) begin
        ev    <= ev << 8;
        nleft <= nleft - 1'b1;
        if (nleft == 1) begin
          ack_tgl     <= req_sync[2];
          event_count <= event_count + 1'b1;
        end
      end
    end
  end

  assign out_valid = (nleft != 0);
  assign out_data  = ev[EV_BYTES*8-1 -: 8];

  // valid/ready rule: an offered byte stays offered, unchanged, until taken
  a_hold_until_ready: assert property (@(posedge clk_sys) disable iff (!rst_sys_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
