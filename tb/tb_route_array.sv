// tb_route_array: checks the mapping-table array.
// After reset every entry reads invalid; written entries read back one cycle
// after the read address is presented; random writes and reads are checked
// against a reference copy; the document's example entries are used first.
`timescale 1ns/1ps
module tb_route_array;
  import eth_pcie_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  logic         we = 0;
  logic [3:0]   waddr = '0, raddr = '0;
  route_entry_t wdata = '0, rdata;

  route_array dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  route_entry_t model [16];
  bit           written [16];

  task automatic write(logic [3:0] a, route_entry_t e);
    @(negedge clk); we = 1; waddr = a; wdata = e;
    @(negedge clk); we = 0;
    model[a] = e; written[a] = 1;
  endtask

  task automatic read(logic [3:0] a);
    @(negedge clk); raddr = a;
    @(negedge clk);
    if (written[a]) check(rdata == model[a], $sformatf("entry %0d", a));
    else            check(rdata.valid == 0, $sformatf("entry %0d invalid after reset", a));
  endtask

  initial begin
    for (int i = 0; i < 16; i++) written[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) read(4'(i));
    write(4'd0, '{valid: 1'b1, age: 2'b00, route_addr: 64'h00000300_0000000C,
                  bdf: '{bus: 8'h05, dev: 5'h0, func: 3'h0}});
    write(4'd1, '{valid: 1'b1, age: 2'b00, route_addr: 64'h00000500_0000000C,
                  bdf: '{bus: 8'h07, dev: 5'h0, func: 3'h0}});
    read(4'd0); read(4'd1); read(4'd2);
    for (int n = 0; n < 200; n++) begin
      if ($urandom % 2) write(4'($urandom), '{valid: 1'($urandom), age: 2'($urandom),
                                             route_addr: {$urandom, $urandom},
                                             bdf: 16'($urandom)});
      read(4'($urandom));
    end
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
