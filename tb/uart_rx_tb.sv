// uart_rx_tb: sends random bytes (8N1, LSB first) at 10 clock cycles per bit
// and checks each received byte, that 'valid' pulses once per frame, that a
// frame with a low stop bit raises 'frame_err' instead, and that a short low
// glitch on the idle line is not taken as a start bit.
`timescale 1ps/1ps
module uart_rx_tb;
  localparam int unsigned CLK_HZ = 1_000_000, BAUD = 100_000, BITC = CLK_HZ / BAUD;
  logic clk = 1'b0, rst_n = 1'b0, rx = 1'b1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] last;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #500 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && valid) begin n_valid++; last = data; end
    if (rst_n && frame_err) n_err++;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    rx = 1'b0; repeat (BITC) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (BITC) @(negedge clk); end
    rx = stop; repeat (BITC) @(negedge clk);
    rx = 1'b1; repeat (BITC) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    for (int k = 0; k < 200; k++) begin
      logic [7:0] b;
      int nv;
      b  = 8'($urandom);
      nv = n_valid;
      send(b, 1'b1);
      checks++;
      if (n_valid != nv + 1 || last != b) begin
        failures++;
        $display("FAIL byte %h got %h (valid %0d)", b, last, n_valid - nv);
      end
    end
    send(8'h55, 1'b0);
    repeat (3 * BITC) @(negedge clk);
    checks++;
    if (n_err != 1 || n_valid != 200) begin failures++; $display("FAIL frame error %0d %0d", n_err, n_valid); end
    // glitch shorter than half a bit
    rx = 1'b0; repeat (2) @(negedge clk); rx = 1'b1;
    repeat (20 * BITC) @(negedge clk);
    checks++;
    if (n_err != 1 || n_valid != 200) begin failures++; $display("FAIL glitch"); end
    send(8'hA7, 1'b1);
    checks++;
    if (n_valid != 201 || last != 8'hA7) begin failures++; $display("FAIL after glitch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
