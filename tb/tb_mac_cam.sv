// tb_mac_cam: checks the 16-word CAM.
// Nothing matches after reset; a write raises BUSY for exactly one cycle and
// becomes visible to compares two cycles after WE; MATCH/MATCH_ADDR follow
// CMP_DIN with one cycle of latency; the lowest matching address wins;
// overwriting a word removes the old value.  A reference model of the words
// is kept in the testbench and random compares are checked against it.
// Follows the document: 1-cycle read, 2-cycle write with BUSY, 16 x 48 bits.
// Own choices: the lowest-address rule checked for duplicate words.
`timescale 1ns/1ps
module tb_mac_cam;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  logic [47:0] cmp_din = '0, din = '0;
  logic        we = 0;
  logic [3:0]  wr_addr = '0;
  logic        busy, match;
  logic [3:0]  match_addr;

  mac_cam dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic [47:0] model [16];
  bit          used [16];

  task automatic write(logic [3:0] a, logic [47:0] d);
    @(negedge clk); we = 1; din = d; wr_addr = a;
    @(negedge clk); we = 0;
    check(busy == 1, "BUSY in the cycle after WE");
    @(negedge clk);
    check(busy == 0, "BUSY for one cycle only");
    model[a] = d; used[a] = 1;
  endtask

  task automatic compare(logic [47:0] d);
    int exp_a = -1;
    for (int i = 15; i >= 0; i--) if (used[i] && model[i] == d) exp_a = i;
    @(negedge clk); cmp_din = d;
    @(negedge clk);
    check(match == (exp_a >= 0), $sformatf("MATCH for %h", d));
    if (exp_a >= 0) check(match_addr == 4'(exp_a), "MATCH_ADDR");
  endtask

  initial begin
    for (int i = 0; i < 16; i++) used[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    compare(48'h0);
    compare(48'h060504030201);
    write(4'd0, 48'h060504030201);
    write(4'd1, 48'h010203040506);
    compare(48'h060504030201);
    compare(48'h010203040506);
    compare(48'h010203040507);
    // visibility timing: compare value equals the word being written
    @(negedge clk); cmp_din = 48'hABCDEF012345; we = 1; din = 48'hABCDEF012345; wr_addr = 4'd7;
    @(negedge clk); we = 0; check(match == 0, "not visible in cycle after WE");
    @(negedge clk); check(match == 0, "not visible while BUSY");
    @(negedge clk); check(match == 1 && match_addr == 4'd7, "visible two cycles after WE");
    model[7] = 48'hABCDEF012345; used[7] = 1;
    // duplicates: lowest address wins
    write(4'd12, 48'h010203040506);
    compare(48'h010203040506);
    // overwrite removes the old word
    write(4'd1, 48'h111111111111);
    compare(48'h010203040506);
    compare(48'h111111111111);
    for (int n = 0; n < 200; n++) begin
      if ($urandom % 2) write(4'($urandom), {40'h0, 8'($urandom % 32)});
      compare({40'h0, 8'($urandom % 32)});
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
