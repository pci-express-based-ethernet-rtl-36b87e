// tb_pcie_rx_if: checks the PCIe Rx interface FSM against a model of the
// PCIe core's receive user interface and a MAC Tx FIFO sink with random
// back-pressure.  The core model presents memory-write TLPs (3DW and 4DW)
// and unsupported ones (memory read, configuration read), honours rx_ws, and
// occasionally raises rx_err in the middle of a payload.  Checks:
//  * unsupported TLPs get rx_abort, never rx_ack, and produce no output;
//  * every supported TLP gets exactly one rx_ack before its payload;
//  * every payload phase reaches the FIFO once, in order, with keep equal to
//    rx_be and last on the phase where rx_dfr was low;
//  * an error closes the partly written frame with a zero-keep phase that
//    carries last and user, and err_report is raised;
//  * every one of the nine FSM states is visited.
// Follows the document: the state numbering, abort of unsupported TLPs, keep
// from byte enables.  Own choices: the core model's timing and the
// frame-closing phase expected on error.
`timescale 1ns/1ps
module tb_pcie_rx_if;
  import eth_pcie_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic         rx_req = 0, rx_ack, rx_dfr = 0, rx_dv = 0, rx_ws, rx_err = 0, rx_abort;
  logic [127:0] rx_desc = '0;
  logic [63:0]  rx_data = '0;
  logic [7:0]   rx_be = '0;
  logic         m_valid, m_ready = 0;
  axis_beat_t   m_beat;
  rx_if_state_t state;
  logic         err_report, frame_done;

  pcie_rx_if dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  axis_beat_t exp_q[$];
  int acks = 0, aborts = 0, errs = 0, ws_in_data = 0, nout = 0;
  bit [8:0] visited = '0;
  bit stall = 0;

  always @(negedge clk) m_ready = !stall && ($urandom % 3 != 0);

  always @(posedge clk) if (rst_n) begin
    visited[state] <= 1'b1;
    if (rx_ack) acks++;
    if (rx_abort) aborts++;
    if (err_report) errs++;
    if (rx_ws && rx_dv) ws_in_data++;
    if (m_valid && m_ready) begin
      nout++;
      if (exp_q.size() == 0) check(0, "unexpected output phase");
      else check(m_beat == exp_q.pop_front(), $sformatf("output phase %0d", nout));
    end
  end

  task automatic tlp(logic [7:0] fmt_type, int nph, int err_at);
    int a0 = acks, b0 = aborts, e0 = errs;
    bit ok = (fmt_type == 8'h40) || (fmt_type == 8'h60);
    @(negedge clk);
    rx_req = 1;
    rx_desc = {fmt_type, 24'h00000F, $urandom, $urandom, $urandom};
    @(posedge clk);
    while (!(rx_ack || rx_abort)) @(posedge clk);
    check(rx_ack == ok && rx_abort == !ok, ok ? "memory write acknowledged" : "unsupported TLP aborted");
    @(negedge clk);
    rx_req = 0;
    if (!ok) return;
    for (int k = 0; k < nph; k++) begin
      logic [7:0] be = (k == nph - 1) ? 8'((1 << (1 + $urandom % 8)) - 1) : 8'hFF;
      while ($urandom % 4 == 0) @(negedge clk);
      rx_dv = 1; rx_data = {$urandom, $urandom}; rx_be = be; rx_dfr = (k != nph - 1);
      if (k == err_at) begin
        rx_err = 1; rx_dv = 0;
        exp_q.push_back('{data: '0, keep: '0, last: 1'b1, user: 1'b1});
        repeat (2) @(negedge clk);
        rx_err = 0;
        repeat (3) @(negedge clk);
        check(errs > e0, "error reported");
        return;
      end
      #1;
      while (rx_ws) begin @(negedge clk); #1; end
      exp_q.push_back('{data: rx_data, keep: be, last: k == nph - 1, user: 1'b0});
      @(posedge clk);
      @(negedge clk);
      rx_dv = 0;
    end
    check(acks == a0 + 1 && aborts == b0, "one acknowledgement per TLP");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    tlp(8'h60, 8, -1);         // table-14 style 60-octet frame, 4DW header
    tlp(8'h40, 8, -1);         // 3DW header
    tlp(8'h04, 1, -1);         // configuration read: abort
    tlp(8'h00, 1, -1);         // memory read: abort
    stall = 1;
    fork
      tlp(8'h60, 20, -1);      // MAC Tx FIFO full: WAIT_FIFO_1 then WAIT_FIFO_2
      begin repeat (12) @(negedge clk); stall = 0; end
    join
    fork                       // FIFO stops right after a frame: WAIT_FIFO_1
      begin tlp(8'h60, 4, -1); tlp(8'h40, 4, -1); end
      begin @(posedge clk iff frame_done); stall = 1; repeat (10) @(negedge clk); stall = 0; end
    join
    tlp(8'h60, 12, 5);         // error in the middle
    for (int n = 0; n < 400; n++) begin
      int r = $urandom % 10;
      if (r == 0) tlp(($urandom % 2) ? 8'h04 : 8'h20, 1, -1);
      else tlp(($urandom % 2) ? 8'h60 : 8'h40, 1 + $urandom % 190,
               (r == 1) ? 1 + $urandom % 2 : -1);
    end
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, "all phases delivered");
    check(ws_in_data > 0, "wait states used during payload");
    for (int s = 0; s < 9; s++) check(visited[s], $sformatf("state %0d visited", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
