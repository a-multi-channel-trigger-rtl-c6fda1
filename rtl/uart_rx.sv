// uart_rx: serial receiver for the NMEA output of the GPS module.
//
// 8 data bits, no parity, one stop bit, least significant bit first (the
// usual NMEA 0183 framing). The line idles high. A falling edge starts a
// frame; the receiver waits half a bit to the middle of the start bit, checks
// it is still low, then samples each data bit and the stop bit one bit period
// apart. 'valid' pulses for one cycle with the byte after the middle of the
// stop bit; a low stop bit gives 'frame_err' instead. Bit period is
// CLK_HZ/BAUD cycles. The board only names the GPS serial lines; the baud
// rate (9600) and framing are assumptions.
`timescale 1ps/1ps
module uart_rx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned BIT_CYC = CLK_HZ / BAUD;
  localparam int unsigned CW      = $clog2(BIT_CYC + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;
  state_t        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;
  logic [1:0]    rx_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      cnt       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
      rx_sync   <= 2'b11;
    end else begin
      rx_sync   <= {rx_sync[0], rx};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      case (state)
        IDLE: if (!rx_sync[1]) begin
          state <= START;
          cnt   <= CW'(BIT_CYC / 2 - 1);
        end
        START: if (cnt != 0) cnt <= cnt - 1'b1;
        else if (rx_sync[1]) state <= IDLE;   // glitch, not a start bit
        else begin
          state <= DATA;
          cnt   <= CW'(BIT_CYC - 1);
          bitn  <= '0;
        end
        DATA: if (cnt != 0) cnt <= cnt - 1'b1;
        else begin
          shreg <= {rx_sync[1], shreg[7:1]};
          cnt   <= CW'(BIT_CYC - 1);
          bitn  <= bitn + 1'b1;
          if (bitn == 3'd7) state <= STOP;
        end
        STOP: if (cnt != 0) cnt <= cnt - 1'b1;
        else begin
          state <= IDLE;
          if (rx_sync[1]) begin
            data  <= shreg;
            valid <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
