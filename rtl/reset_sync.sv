// reset_sync: asynchronous assertion, synchronous release of an active-low
// reset in one clock domain (two flip-flops). Used once per clock domain of
// the board firmware.
`timescale 1ps/1ps
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic r1;
  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      r1        <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      r1        <= 1'b1;
      rst_n_out <= r1;
    end
  end
endmodule
