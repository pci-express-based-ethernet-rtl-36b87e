// tb_output_addr_lookup: checks the parser + CAM + array chain.
// The driver writes the document's two example entries plus random ones;
// frames with known, unknown and deleted destinations are streamed.  Checks:
// res_valid comes exactly three cycles after the parser's complete pulse
// (which itself follows the second data phase by one cycle), the routing
// address, bus number and TC of each match, no match for unknown or deleted
// entries, the source-address report, and that `ready` drops while the CAM
// is busy with a write.
`timescale 1ns/1ps
module tb_output_addr_lookup;
  import eth_pcie_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic         in_valid = 0, in_last = 0, in_ready;
  logic [63:0]  in_data = '0;
  logic         ready, src_valid, cam_busy;
  logic [47:0]  src_mac, dst_mac;
  logic         cam_we = 0, arr_we = 0;
  logic [47:0]  cam_din = '0;
  logic [3:0]   cam_wr_addr = '0, arr_waddr = '0, res_cam_addr;
  route_entry_t arr_wdata = '0;
  logic [15:0]  len_type;
  logic         res_valid, res_match;
  logic [63:0]  res_route_addr;
  bdf_t         res_bdf;
  logic [2:0]   res_tc;
  assign in_ready = ready;

  output_addr_lookup dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // reference table
  logic [47:0]  t_mac [16];
  route_entry_t t_ent [16];
  bit           t_used [16];

  task automatic write_entry(logic [3:0] a, logic [47:0] mac, route_entry_t e);
    @(negedge clk);
    while (cam_busy) @(negedge clk);
    cam_we = 1; cam_din = mac; cam_wr_addr = a; arr_we = 1; arr_waddr = a; arr_wdata = e;
    @(negedge clk);
    cam_we = 0; arr_we = 0;
    check(cam_busy && !ready, "ready withheld while CAM busy");
    @(negedge clk);
    t_mac[a] = mac; t_ent[a] = e; t_used[a] = 1;
  endtask

  int cyc = 0, complete_cyc = -100;
  always @(posedge clk) begin
    if (dut.complete) complete_cyc = cyc;
    cyc++;
  end

  task automatic frame(logic [47:0] da, logic [47:0] sa, bit vlan, logic [2:0] pcp, int nb);
    logic [7:0] b[80];
    int exp_a;
    bit got;
    for (int i = 0; i < 80; i++) b[i] = 8'($urandom);
    for (int i = 0; i < 6; i++) begin b[i] = da[8*i +: 8]; b[6+i] = sa[8*i +: 8]; end
    if (vlan) begin b[12] = 8'h81; b[13] = 8'h00; b[14] = {pcp, 5'h0}; end
    else begin b[12] = 8'h08; b[13] = 8'h00; end
    exp_a = -1;
    for (int i = 15; i >= 0; i--) if (t_used[i] && t_mac[i] == da) exp_a = i;
    fork
      for (int k = 0; k < nb; k++) begin
        @(negedge clk);
        in_valid = 1; in_last = (k == nb - 1);
        for (int i = 0; i < 8; i++) in_data[8*i +: 8] = b[8*k + i];
        #1;
        while (!ready) begin @(negedge clk); #1; end
        @(posedge clk); #1 in_valid = 0; in_last = 0;
      end
      begin
        got = 0;
        for (int w = 0; w < 40 && !got; w++) begin
          @(posedge clk); #1;
          if (res_valid) begin
            got = 1;
            check(cyc == complete_cyc + 3, "result three cycles after complete");
            check(res_match == (exp_a >= 0 && t_ent[exp_a].valid), $sformatf("match for %h", da));
            if (exp_a >= 0 && t_ent[exp_a].valid) begin
              check(res_route_addr == t_ent[exp_a].route_addr, "routing address");
              check(res_bdf == t_ent[exp_a].bdf, "bus/device/function");
              check(res_cam_addr == 4'(exp_a), "CAM address");
            end
            check(res_tc == (vlan ? pcp : 3'd0), "traffic class");
            check(dst_mac == da, "destination address");
          end
        end
        check(got, "result produced");
      end
    join
    @(posedge clk);
  endtask

  int src_reports = 0;
  logic [47:0] last_src;
  always @(posedge clk) if (src_valid) begin src_reports++; last_src = src_mac; end

  initial begin
    for (int i = 0; i < 16; i++) t_used[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(48'h060504030201, 48'h1, 0, 0, 8);
    write_entry(4'd0, 48'h060504030201, '{valid: 1, age: 2'b00,
                route_addr: 64'h00000300_0000000C, bdf: '{bus: 8'h05, dev: 0, func: 0}});
    write_entry(4'd1, 48'h010203040506, '{valid: 1, age: 2'b00,
                route_addr: 64'h00000500_0000000C, bdf: '{bus: 8'h07, dev: 0, func: 0}});
    frame(48'h060504030201, 48'h020206050403, 0, 0, 8);
    check(last_src == 48'h020206050403, "source address reported");
    frame(48'h010203040506, 48'h040302010202, 1, 3'd6, 11);
    frame(48'h010203040507, 48'h040302010202, 0, 0, 8);
    for (int n = 0; n < 60; n++) begin
      if ($urandom % 3 == 0)
        write_entry(4'($urandom), {44'h0, 4'($urandom)},
                    '{valid: 1'($urandom % 4 != 0), age: 2'($urandom),
                      route_addr: {$urandom, $urandom}, bdf: 16'($urandom)});
      frame({44'h0, 4'($urandom)}, {$urandom, 16'h0}, 1'($urandom), 3'($urandom), 2 + $urandom % 6);
    end
    check(src_reports == 64, "one source report per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
