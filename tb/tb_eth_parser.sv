// tb_eth_parser: checks the Ethernet header parser.
// Frames are streamed with random gaps; the test checks the extracted
// destination/source addresses and length/type, the VLAN flag and the
// PCP-to-TC result, that `complete` comes exactly one cycle after the second
// data phase is taken, that `ready` is low only in IDLE, and the runt flag
// for a one-phase frame.
// Follows the document: field positions in the first two data phases and
// the VLAN PCP extraction.  Own choices: the frame mix and the gap pattern.
`timescale 1ns/1ps
module tb_eth_parser;
  import eth_pcie_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic        in_valid = 0, in_last = 0;
  logic [63:0] in_data = '0;
  logic        ready, complete, runt, vlan;
  logic [47:0] dst_mac, src_mac;
  logic [15:0] len_type;
  logic [2:0]  tc;
  logic        in_ready;
  logic        sink_ready = 1;
  assign in_ready = ready & sink_ready;

  eth_parser dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  int completes = 0;
  always @(posedge clk) if (complete) completes++;

  task automatic send(logic [47:0] da, logic [47:0] sa, logic [15:0] t, logic [15:0] tci,
                      int nbeats);
    logic [7:0] b[64];
    for (int i = 0; i < 64; i++) b[i] = 8'($urandom);
    for (int i = 0; i < 6; i++) begin b[i] = da[8*i +: 8]; b[6+i] = sa[8*i +: 8]; end
    b[12] = t[15:8]; b[13] = t[7:0]; b[14] = tci[15:8]; b[15] = tci[7:0];
    for (int k = 0; k < nbeats; k++) begin
      bit taken;
      @(negedge clk);
      in_valid = 1; in_last = (k == nbeats - 1);
      for (int i = 0; i < 8; i++) in_data[8*i +: 8] = b[8*k + i];
      // hold until taken, with random back-pressure from the rest of the path
      do begin
        sink_ready = ($urandom % 4 != 0);
        #1;
        taken = in_ready;
        if (!taken) @(negedge clk);
      end while (!taken);
      @(posedge clk);
      #1 in_valid = 0; in_last = 0;
      if (k == 1) begin
        @(negedge clk);
        check(complete && !runt, "complete one cycle after phase 2");
      end
    end
    repeat ($urandom % 3) @(posedge clk);
  endtask

  initial begin
    int c0;
    logic [47:0] da, sa;
    bit is_tag;
    logic [2:0] pcp;
    logic [15:0] t, tci;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(ready == 0, "not ready in IDLE");
    for (int n = 0; n < 40; n++) begin
      da = {$urandom, $urandom}; sa = {$urandom, $urandom};
      is_tag = (n % 3 == 0);
      pcp = 3'($urandom);
      t = is_tag ? 16'h8100 : 16'h0800 + 16'(n);
      tci = {pcp, 13'h0123};
      c0 = completes;
      send(da, sa, t, tci, 2 + $urandom % 6);
      repeat (2) @(posedge clk);
      check(completes == c0 + 1, "one complete per frame");
      check(dst_mac == da, "destination address");
      check(src_mac == sa, "source address");
      check(len_type == t, "length/type");
      check(vlan == is_tag, "VLAN flag");
      check(tc == (is_tag ? pcp : 3'd0), "traffic class");
      check(!runt, "not runt");
    end
    // runt: a single-phase frame
    c0 = completes;
    send(48'h1, 48'h2, 16'h0800, 16'h0, 1);
    repeat (2) @(posedge clk);
    check(completes == c0 + 1 && runt, "runt frame reported");
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
