// pps_counter: fine time tag of the board.
//
// A counter running on the 100 MHz system clock is reset by every rising edge
// of the GPS pulse-per-second, so its value is the time since the last PPS in
// 10 ns steps; together with the UTC second decoded from the NMEA sentences
// it gives the absolute time of an event. The asynchronous PPS input passes a
// two-stage synchroniser and an edge detector, so the count restarts 3 cycles
// after the PPS edge (a constant offset). At each PPS the count reached is
// kept in 'last_period' (100,000,000 - 1 for an exact clock), which measures
// the local oscillator against GPS. 'pps_pulse' is a one-cycle strobe,
// 'pps_seen' is set by the first PPS after reset. The counter saturates if
// the PPS stops. The reset-by-PPS counter at 100 MHz is from the board
// description; the synchroniser, the saturation and 'last_period' are this
// design's choices.
`timescale 1ps/1ps
module pps_counter #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pps,
  output logic [CNT_W-1:0] count,
  output logic [CNT_W-1:0] last_period,
  output logic             pps_pulse,
  output logic             pps_seen
);

  logic [2:0] pps_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pps_sync    <= '0;
      count       <= '0;
      last_period <= '0;
      pps_pulse   <= 1'b0;
      pps_seen    <= 1'b0;
    end else begin
      pps_sync  <= {pps_sync[1:0], pps};
      pps_pulse <= pps_sync[1] & ~pps_sync[2];
      if (pps_sync[1] & ~pps_sync[2]) begin
        count       <= '0;
        last_period <= count;
        pps_seen    <= 1'b1;
      end else if (count != '1) begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
