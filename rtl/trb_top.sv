// trb_top: FPGA firmware of the trigger and acquisition board (TRB) of a
// two-layer scintillator cosmic-ray telescope read by 16 SiPMs.
//
// Data flow:
//   hit_i[16] (discriminated SiPM signals, LVDS)
//     -> 16 tapped delay lines sampled at 320 MHz -> 16 TDC channel decoders
//        (leading / trailing edge time stamps against a shared coarse counter)
//     -> 3-out-of-4 coincidence trigger between the two layers
//     -> event builder: edge times and time over threshold of all channels,
//        GPS time and position, PPS fine counter (100 MHz, reset by the PPS)
//     -> dual-clock event FIFO -> FT232H parallel FIFO interface (USB, 60 MB/s)
//   gps_rx (NMEA serial) -> UART receiver -> NMEA parser (GPGGA/GPRMC/GNRMC)
//
// Clocks: clk_tdc 320 MHz (TDC sampling, trigger, event capture), clk_sys
// 100 MHz (GPS, PPS counter, event packing), clk_ft 60 MHz from the FT232H.
// In the FPGA the two first come from a PLL, which is outside this RTL.
// rst_n is asynchronous and released synchronously in each domain.
// 'run_enable' (set by the host that controls the runs) gates the trigger.
// The delay lines are behavioural models of the placed carry chains, so this
// top simulates but is not itself synthesizable as written. The structure
// follows the board description; the clock-domain split, the shared coarse
// counter and the status outputs are this design's choices. The HPTDC
// mezzanine receives the same hit signals on the board and is not part of
// this RTL.
`timescale 1ps/1ps
module trb_top
  import trb_pkg::*;
#(
  parameter int unsigned SYS_HZ   = 100_000_000,
  parameter int unsigned GPS_BAUD = 9600,
  parameter int unsigned WINDOW   = 32,
  parameter int unsigned COLLECT  = 256,
  parameter int unsigned PRE      = 64,
  parameter int unsigned FIFO_AW  = 11
) (
  input  logic            clk_tdc,
  input  logic            clk_sys,
  input  logic            clk_ft,
  input  logic            rst_n,
  input  logic [N_CH-1:0] hit_i,
  input  logic            run_enable,
  // GPS module
  input  logic            gps_rx,
  input  logic            gps_pps,
  // FT232H synchronous FIFO
  input  logic            ft_txe_n,
  output logic [7:0]      ft_data,
  output logic            ft_wr_n,
  output logic            ft_rd_n,
  output logic            ft_oe_n,
  output logic            ft_siwu_n,
  // status
  output logic [31:0]     trigger_count,
  output logic [31:0]     event_count,
  output logic [31:0]     bytes_sent,
  output logic [31:0]     pps_period,
  output logic            gps_fix,
  output logic            pps_seen
);

  logic rst_tdc_n, rst_sys_n, rst_ft_n;
  reset_sync u_rs_tdc (.clk(clk_tdc), .rst_n_in(rst_n), .rst_n_out(rst_tdc_n));
  reset_sync u_rs_sys (.clk(clk_sys), .rst_n_in(rst_n), .rst_n_out(rst_sys_n));
  reset_sync u_rs_ft  (.clk(clk_ft),  .rst_n_in(rst_n), .rst_n_out(rst_ft_n));

  // ---------------- TDC domain ----------------
  logic [COARSE_W-1:0] coarse;
  always_ff @(posedge clk_tdc or negedge rst_tdc_n) begin
    if (!rst_tdc_n) coarse <= '0;
    else            coarse <= coarse + 1'b1;
  end

  logic [N_TAPS-1:0] taps [N_CH];
  tdc_rec_t          recs [N_CH];
  logic [N_CH-1:0]   lead_pulse, trail_pulse;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    tdc_delay_line #(.TAPS(TDL_TAPS), .STEP(TDL_STEP)) u_tdl (
      .clk(clk_tdc), .hit(hit_i[c]), .taps(taps[c]));
    tdc_channel u_ch (
      .clk(clk_tdc), .rst_n(rst_tdc_n), .taps(taps[c]), .coarse(coarse),
      .rec(recs[c]), .lead_pulse(lead_pulse[c]), .trail_pulse(trail_pulse[c]));
  end

  logic              trig, busy;
  logic [N_CH/4-1:0] trig_groups;
  logic [1:0]        run_sync;

  always_ff @(posedge clk_tdc or negedge rst_tdc_n) begin
    if (!rst_tdc_n) begin
      run_sync      <= '0;
      trigger_count <= '0;
    end else begin
      run_sync <= {run_sync[0], run_enable};
      if (trig) trigger_count <= trigger_count + 1'b1;
    end
  end

  coincidence_trigger #(.WINDOW(WINDOW)) u_trig (
    .clk(clk_tdc), .rst_n(rst_tdc_n), .enable(run_sync[1]), .busy(busy),
    .lead_pulse(lead_pulse), .trig(trig), .trig_groups(trig_groups));

  // ---------------- system domain ----------------
  logic [31:0] pps_count;
  pps_counter #(.CNT_W(32)) u_pps (
    .clk(clk_sys), .rst_n(rst_sys_n), .pps(gps_pps), .count(pps_count),
    .last_period(pps_period), .pps_pulse(), .pps_seen(pps_seen));

  logic [7:0] rx_byte;
  logic       rx_valid;
  uart_rx #(.CLK_HZ(SYS_HZ), .BAUD(GPS_BAUD)) u_uart (
    .clk(clk_sys), .rst_n(rst_sys_n), .rx(gps_rx), .data(rx_byte),
    .valid(rx_valid), .frame_err());

  gps_info_t gps;
  nmea_parser u_nmea (
    .clk(clk_sys), .rst_n(rst_sys_n), .valid(rx_valid), .data(rx_byte),
    .gps(gps), .updated(), .is_rmc());
  assign gps_fix = gps.fix_valid;

  logic [7:0] ev_data;
  logic       ev_valid, fifo_full;
  event_builder #(.COLLECT(COLLECT), .PRE(PRE)) u_evb (
    .clk_tdc(clk_tdc), .rst_tdc_n(rst_tdc_n), .trig(trig),
    .trig_groups(trig_groups), .coarse(coarse), .recs(recs), .busy(busy),
    .clk_sys(clk_sys), .rst_sys_n(rst_sys_n), .pps_count(pps_count),
    .pps_seen(pps_seen), .gps(gps), .out_data(ev_data), .out_valid(ev_valid),
    .out_ready(!fifo_full), .event_count(event_count));

  // ---------------- USB domain ----------------
  logic [7:0] fifo_q;
  logic       fifo_empty, fifo_rd;
  async_fifo #(.DW(8), .AW(FIFO_AW)) u_fifo (
    .wr_clk(clk_sys), .wr_rst_n(rst_sys_n), .wr_en(ev_valid),
    .wr_data(ev_data), .full(fifo_full),
    .rd_clk(clk_ft), .rd_rst_n(rst_ft_n), .rd_en(fifo_rd),
    .rd_data(fifo_q), .empty(fifo_empty));

  ft232h_fifo_if u_ft (
    .clk(clk_ft), .rst_n(rst_ft_n), .fifo_data(fifo_q),
    .fifo_empty(fifo_empty), .fifo_rd(fifo_rd), .ft_txe_n(ft_txe_n),
    .ft_data(ft_data), .ft_wr_n(ft_wr_n), .ft_rd_n(ft_rd_n),
    .ft_oe_n(ft_oe_n), .ft_siwu_n(ft_siwu_n), .bytes_sent(bytes_sent));

endmodule
