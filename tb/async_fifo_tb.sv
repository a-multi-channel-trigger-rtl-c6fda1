// async_fifo_tb: writes random bytes at 100 MHz and reads them at 60 MHz
// with random enables on both sides, keeping a queue of what was accepted;
// every byte read must come out in order and unchanged. A small FIFO (8
// words) is filled until 'full' and drained until 'empty' to check that no
// word is lost or invented at either limit and that 8 words fit.
`timescale 1ps/1ps
module async_fifo_tb;
  localparam int unsigned AW = 3;
  logic wr_clk = 1'b0, rd_clk = 1'b0, wr_rst_n = 1'b0, rd_rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [7:0] wr_data = '0, rd_data;
  logic full, empty;
  int checks = 0, failures = 0;
  logic [7:0] q [$];
  int n_read = 0, n_full = 0;
  bit wr_go = 0, rd_go = 0;

  async_fifo #(.DW(8), .AW(AW)) dut (.*);

  always #5000 wr_clk = ~wr_clk;
  always #8333 rd_clk = ~rd_clk;

  initial begin
    #(200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  always @(posedge wr_clk) begin
    if (wr_en && !full) q.push_back(wr_data);
    if (full) n_full++;
    #1;
    wr_en   = wr_go && ($urandom_range(0, 3) != 0);
    wr_data = 8'($urandom);
  end

  // reader
  always @(posedge rd_clk) begin
    if (rd_en && !empty) begin
      checks++;
      n_read++;
      if (q.size() == 0 || rd_data !== q[0]) begin
        failures++;
        $display("FAIL read %h expected %h", rd_data, q.size() ? q[0] : 8'hxx);
      end
      if (q.size()) void'(q.pop_front());
    end
    #1;
    rd_en = rd_go && ($urandom_range(0, 2) != 0);
  end

  initial begin
    repeat (3) @(posedge rd_clk);
    wr_rst_n = 1'b1; rd_rst_n = 1'b1;
    repeat (3) @(posedge rd_clk);
    // fill without reading
    wr_go = 1;
    repeat (60) @(posedge wr_clk);
    wr_go = 0;
    repeat (5) @(posedge wr_clk);
    checks++;
    if (!full || q.size() != 2**AW) begin failures++; $display("FAIL fill: full=%0b size=%0d", full, q.size()); end
    // drain
    rd_go = 1;
    repeat (60) @(posedge rd_clk);
    checks++;
    if (!empty || q.size() != 0) begin failures++; $display("FAIL drain"); end
    // both sides at random
    wr_go = 1;
    repeat (5000) @(posedge wr_clk);
    wr_go = 0;
    repeat (200) @(posedge rd_clk);
    checks++;
    if (q.size() != 0 || n_read < 2000) begin failures++; $display("FAIL random: left %0d read %0d", q.size(), n_read); end
    $display("read %0d words, full seen %0d cycles", n_read, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
