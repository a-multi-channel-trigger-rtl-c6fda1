// ft232h_fifo_if_tb: a show-ahead FIFO model feeds the interface and an
// FT232H model takes a byte on each rising clock edge with both TXE# and WR#
// low. Every byte must reach the bridge once and in order while TXE# is
// toggled at random (the bridge's FIFO full). With TXE# held low and data
// always available the interface must move one byte per clock (60 MB/s at
// 60 MHz): 200 bytes within 200 + 3 cycles. RD#, OE# and SIWU# must stay high.
`timescale 1ps/1ps
module ft232h_fifo_if_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] fifo_data;
  logic fifo_empty, fifo_rd;
  logic ft_txe_n = 1'b1;
  logic [7:0] ft_data;
  logic ft_wr_n, ft_rd_n, ft_oe_n, ft_siwu_n;
  logic [31:0] bytes_sent;
  int checks = 0, failures = 0;
  logic [7:0] src [$];
  logic [7:0] exp [$];
  int n_rx = 0;

  ft232h_fifo_if dut (.*);

  always #8333 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign fifo_empty = (src.size() == 0);
  assign fifo_data  = fifo_empty ? 8'h00 : src[0];

  always @(posedge clk) begin
    if (rst_n) begin
      bit pop;
      pop = fifo_rd && !fifo_empty;
      if (!ft_wr_n) begin
        checks++;
        n_rx++;
        if (ft_txe_n) begin failures++; $display("FAIL write while TXE# high"); end
        if (exp.size() == 0 || ft_data !== exp[0]) begin
          failures++; $display("FAIL byte %h", ft_data);
        end
        if (exp.size()) void'(exp.pop_front());
      end
      if (!ft_rd_n || !ft_oe_n || !ft_siwu_n) begin
        failures++; checks++; $display("FAIL control pins");
      end
      // the FIFO model changes only after the interface has sampled it
      #1;
      if (pop) void'(src.pop_front());
    end
  end

  task automatic load(input int n);
    for (int i = 0; i < n; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      src.push_back(b);
      exp.push_back(b);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // full rate
    @(negedge clk);
    load(200);
    ft_txe_n = 1'b0;
    repeat (203) @(negedge clk);
    checks++;
    if (n_rx != 200 || bytes_sent != 200) begin
      failures++; $display("FAIL rate: %0d bytes in 203 cycles", n_rx);
    end
    // random TXE# and gaps in the data
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      ft_txe_n = ($urandom_range(0, 2) == 0);
      if ($urandom_range(0, 3) == 0) load($urandom_range(1, 4));
    end
    ft_txe_n = 1'b0;
    repeat (200) @(negedge clk);
    checks++;
    if (exp.size() != 0 || bytes_sent != 32'(n_rx)) begin
      failures++; $display("FAIL left %0d bytes", exp.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
