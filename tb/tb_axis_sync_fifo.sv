// tb_axis_sync_fifo: checks the PCIe Tx FIFO.
// Random writes and reads against a reference queue; checks order and
// content, count, full and empty flags, first-word fall-through, and that
// `clear` empties the FIFO in one cycle.
// Follows the document: clearing the FIFO when a frame is discarded.  Own
// choices: the reduced depth (16) and the random traffic pattern.
`timescale 1ns/1ps
module tb_axis_sync_fifo;
  import eth_pcie_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  localparam int AW = 4;
  logic       clear = 0, s_valid = 0, s_ready, m_valid, m_ready = 0;
  axis_beat_t s_beat = '0, m_beat;
  logic [AW:0] count;

  axis_sync_fifo #(.ADDR_W(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  axis_beat_t q[$];
  int clears = 0, fulls = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      clear = 0;
      #1;
      check(count == ($bits(count))'(q.size()), "count");
      check(m_valid == (q.size() != 0), "empty flag");
      check(s_ready == (q.size() != (1 << AW)), "full flag");
      if (q.size() == (1 << AW)) fulls++;
      if (q.size() != 0) check(m_beat == q[0], "head of FIFO");
      clear   = ($urandom % 200 == 0);
      s_valid = ($urandom % 2 == 0) || (n % 500 < 60);
      s_beat  = '{data: {$urandom, $urandom}, keep: 8'($urandom), last: 1'($urandom), user: 1'($urandom)};
      m_ready = ($urandom % 3 == 0) && !(n % 500 < 60);
      #1;
      @(posedge clk);
      if (clear) begin q.delete(); clears++; end
      else begin
        if (m_valid && m_ready) void'(q.pop_front());
        if (s_valid && s_ready) q.push_back(s_beat);
      end
    end
    check(clears > 0 && fulls > 0, "clear and full exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
