// tb_axis_async_fifo: checks the dual-clock FIFO (MAC Rx and MAC Tx FIFO).
// Writer at 156.25 MHz, reader at 125 MHz, both with random valid/ready.
// Every data phase must come out once, in order, unchanged; the FIFO must
// fill (s_ready low) when the reader stalls and drain afterwards; wr_count
// must never exceed the depth.  A small depth keeps the run short.
// Follows the document: the 156.25 MHz and 125 MHz clocks.  Own choices: the
// reduced depth (16) and the random traffic pattern.
`timescale 1ns/1ps
module tb_axis_async_fifo;
  import eth_pcie_pkg::*;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  always #3.2 wr_clk = ~wr_clk;
  always #4.0 rd_clk = ~rd_clk;

  localparam int AW = 4;
  logic       s_valid = 0, s_ready, m_valid, m_ready = 0;
  axis_beat_t s_beat = '0, m_beat;
  logic [AW:0] wr_count;

  axis_async_fifo #(.ADDR_W(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  axis_beat_t sent[$];
  int nsent = 0, nrecv = 0, full_seen = 0;
  bit stall_reader = 0;
  localparam int N = 3000;

  always @(posedge wr_clk) if (wr_rst_n) begin
    if (s_valid && s_ready) begin sent.push_back(s_beat); nsent++; end
    if (!s_ready) full_seen++;
    if (wr_count > (1 << AW)) check(0, "wr_count above depth");
    if ((s_valid && s_ready) || !s_valid) begin
      s_valid <= (nsent + (s_valid && s_ready) < N) && ($urandom % 3 != 0);
      s_beat  <= '{data: {$urandom, $urandom}, keep: 8'($urandom), last: 1'($urandom), user: 1'($urandom)};
    end
  end

  always @(posedge rd_clk) if (rd_rst_n) begin
    if (m_valid && m_ready) begin
      if (sent.size() == 0) check(0, "output with nothing written");
      else check(m_beat == sent.pop_front(), $sformatf("phase %0d", nrecv));
      nrecv++;
    end
    m_ready <= !stall_reader && ($urandom % 4 != 0);
  end

  initial begin
    repeat (3) @(posedge rd_clk);
    wr_rst_n = 1; rd_rst_n = 1;
    repeat (200) @(posedge rd_clk);
    stall_reader = 1;
    repeat (200) @(posedge rd_clk);
    check(full_seen > 0, "FIFO fills when the reader stalls");
    stall_reader = 0;
    while (nrecv < N) @(posedge rd_clk);
    repeat (10) @(posedge rd_clk);
    check(nrecv == N && sent.size() == 0, "all phases delivered");
    check(!m_valid, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge rd_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
