// tb_pcie_tx_if: checks the PCIe Tx interface FSM against a model of the
// PCIe core's transmit user interface, with the PCIe Tx FIFO as a helper.
// Each frame gets a random length, lookup result (hit/miss, 32- or 64-bit
// routing address, TC) and FCS status.  The core model grants tx_ack after
// a random delay and asserts random wait states.  Checks:
//  * a frame with a bad FCS, no match, or too large for the FIFO is dropped
//    and never requested;
//  * every forwarded frame gives exactly one descriptor, built here
//    independently (3DW/4DW format, length in DW, first/last byte enables);
//  * data phases start after tx_ack, are the frame's data in order, tx_dfr
//    is low only on the last phase and tx_be is the last phase's keep;
//  * tx_err during the payload drops the rest of the frame;
//  * every FSM state except WAIT_FIFO (unreachable, see the RTL) is visited.
// Follows the document: the request/ack/dfr/wait-state handshake and the
// discard cases.  Own choices: the descriptor rule checked is the PCIe one
// (length rounded up to DW), and the core model's timing.
`timescale 1ns/1ps
module tb_pcie_tx_if;
  import eth_pcie_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic         in_valid = 0, in_ready, ready, lk_ready = 1;
  axis_beat_t   in_beat = '0;
  logic         res_valid = 0, res_match = 0;
  logic [63:0]  res_route_addr = '0;
  logic [2:0]   res_tc = '0;
  logic [15:0]  req_id = 16'h0100;
  logic         f_full, f_wr_en, f_valid, f_pop, f_clear, f_s_ready;
  axis_beat_t   f_beat;
  logic         tx_req, tx_ack = 0, tx_dfr, tx_dv, tx_ws = 0, tx_err;
  logic [127:0] tx_desc;
  logic [63:0]  tx_data;
  logic [7:0]   tx_be;
  tx_if_state_t state;
  logic         frame_sent, frame_dropped;
  logic [8:0]   f_count;

  assign in_ready = ready & lk_ready;
  assign f_full   = ~f_s_ready;

  axis_sync_fifo #(.ADDR_W(8)) u_fifo (
    .clk, .rst_n, .clear(f_clear),
    .s_valid(f_wr_en), .s_ready(f_s_ready), .s_beat(in_beat),
    .m_valid(f_valid), .m_ready(f_pop), .m_beat(f_beat), .count(f_count));

  pcie_tx_if dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // Expected frame
  logic [63:0]  e_data[$];
  logic [7:0]   e_keep;
  logic [127:0] e_desc;
  int           err_at = -1;   // data phase index at which tx_err is raised
  int           phases = 0, descs = 0, sent = 0, dropped = 0;
  bit           acked = 0;
  bit [9:0]     visited = '0;

  assign tx_err = (err_at >= 0) && tx_dv && (phases == err_at);

  function automatic logic [3:0] mask(int n);
    return (n % 4 == 0) ? 4'hF : 4'((1 << (n % 4)) - 1);
  endfunction

  // core model
  always @(posedge clk) if (rst_n) begin
    visited[state] <= 1'b1;
    tx_ws  <= ($urandom % 4 == 0);
    tx_ack <= tx_req && !tx_ack && ($urandom % 3 == 0);
    if (tx_req && tx_ack) begin
      descs++;
      check(tx_desc == e_desc, $sformatf("descriptor %h expected %h", tx_desc, e_desc));
      check(tx_dfr, "tx_dfr high with the descriptor");
      acked = 1;
    end
    if (tx_dv) check(acked && !tx_req, "data only after tx_ack");
    if (tx_dv && !tx_ws && !tx_err) begin
      if (e_data.size() == 0) check(0, "unexpected data phase");
      else begin
        check(tx_data == e_data.pop_front(), $sformatf("data phase %0d", phases));
        check(tx_dfr == (e_data.size() != 0), "tx_dfr low only on the last phase");
        check(tx_be == (e_data.size() == 0 ? e_keep : 8'hFF), "tx_be");
      end
      phases++;
    end
    if (frame_sent) sent++;
    if (frame_dropped) dropped++;
  end

  task automatic frame(int nbytes, bit match, bit fcs_ok, bit wide, int err);
    int nb = (nbytes + 7) / 8;
    logic [63:0] a = {wide ? $urandom : 32'h0, $urandom};
    logic [2:0]  tc = 3'($urandom);
    logic [63:0] d[$];
    int len = (nbytes + 3) / 4;
    logic [3:0] fbe, lbe;
    logic [31:0] dw0, dw1;
    int s0 = sent, d0 = dropped, q0 = descs;
    bit fwd = match && fcs_ok && nb <= 256;
    int res_at = 1 + $urandom % 4;   // cycles after the second (or only) phase
    int taken = 0;
    for (int k = 0; k < nb; k++) d.push_back({$urandom, $urandom});
    if (len == 1) begin fbe = mask(nbytes); lbe = 4'h0; end
    else begin fbe = 4'hF; lbe = mask(nbytes); end
    dw0 = {wide ? 3'b011 : 3'b010, 5'b00000, 1'b0, tc, 4'h0, 1'b0, 1'b0, 2'b00, 2'b00, 10'(len)};
    dw1 = {req_id, 8'h00, lbe, fbe};
    e_desc = wide ? {dw0, dw1, a[63:32], a[31:2], 2'b00} : {dw0, dw1, a[31:2], 2'b00, 32'h0};
    e_keep = 8'((1 << (nbytes - 8 * (nb - 1))) - 1);
    if (nbytes - 8 * (nb - 1) == 8) e_keep = 8'hFF;
    e_data.delete();
    if (fwd) foreach (d[i]) e_data.push_back(d[i]);
    if (fwd && err >= 0) begin
      err_at = phases + err; // absolute index of the failing phase
    end else err_at = -1;
    acked = 0;
    fork
      for (int k = 0; k < nb; k++) begin
        @(negedge clk);
        lk_ready = ($urandom % 4 != 0);
        in_valid = 1;
        in_beat = '{data: d[k], keep: (k == nb - 1) ? e_keep : 8'hFF, last: k == nb - 1,
                    user: (k == nb - 1) ? fcs_ok : 1'b0};
        #1;
        while (!in_ready) begin @(negedge clk); lk_ready = ($urandom % 4 != 0); #1; end
        @(posedge clk); #1 in_valid = 0;
        taken++;
      end
      begin
        while (taken < (nb < 2 ? 1 : 2)) @(negedge clk);
        repeat (res_at) @(negedge clk);
        res_valid = 1; res_match = match; res_route_addr = a; res_tc = tc;
        @(negedge clk) res_valid = 0;
      end
    join
    for (int w = 0; w < 4000 && sent == s0 && dropped == d0; w++) @(posedge clk);
    @(negedge clk);
    if (fwd && err < 0) begin
      check(sent == s0 + 1 && dropped == d0, "frame forwarded");
      check(descs == q0 + 1, "one descriptor");
      check(e_data.size() == 0, "all data phases delivered");
    end else begin
      check(dropped == d0 + 1 && sent == s0, "frame dropped");
      check(descs == q0 + (fwd ? 1 : 0), fwd ? "descriptor before error" : "no request for dropped frame");
    end
    @(negedge clk);
    check(!f_valid, "PCIe Tx FIFO empty between frames");
    e_data.delete();
    err_at = -1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(60, 1, 1, 0, -1);           // table-14 sized frame, 3DW
    frame(60, 1, 1, 1, -1);           // 4DW
    frame(64, 0, 1, 0, -1);           // no match
    frame(64, 1, 0, 0, -1);           // bad FCS
    frame(3, 1, 1, 0, -1);            // single DW
    frame(8, 1, 1, 1, -1);            // single phase
    frame(1514, 1, 1, 1, -1);         // maximum standard frame
    frame(2100, 1, 1, 0, -1);         // larger than the FIFO
    frame(200, 1, 1, 0, 5);           // error mid-payload
    for (int n = 0; n < 300; n++)
      frame(1 + $urandom % 300, $urandom % 5 != 0, $urandom % 6 != 0, 1'($urandom),
            ($urandom % 8 == 0) ? 0 : -1);
    for (int s = 0; s < 10; s++)
      if (s != TX_WAIT_FIFO) check(visited[s], $sformatf("state %0d visited", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
