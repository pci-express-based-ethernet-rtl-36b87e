// tb_pdfc_flow_ctrl: checks the transmitter-side PDFC flow control.  A
// stream of frames is presented as the MAC receiver would: valid PDFC frames
// with random class-enable vectors and timers (including zero timers that
// release a class), and frames that must be ignored: ordinary data frames,
// bad FCS, wrong destination, wrong type, wrong opcode and too short.  A
// model loads and counts down eight timers (one quantum = 8 cycles from
// reset); paused[] and every timer must equal the model in every cycle, and
// frame_seen must pulse exactly for the valid PDFC frames.
// Follows the document: suspension until the timer expires, 512-bit-time
// quanta.  Own choices: the frame layout and the rejected-frame kinds.
`timescale 1ns/1ps
module tb_pdfc_flow_ctrl;
  import eth_pcie_pkg::*;
  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;

  logic             s_valid = 0;
  axis_beat_t       s_beat = '0;
  logic [7:0]       paused;
  logic [7:0][15:0] timer;
  logic             frame_seen;

  pdfc_flow_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  longint cyc = 0;
  int     m_t[8];
  bit     load_now = 0;
  logic [7:0]       load_en;
  logic [7:0][15:0] load_t;
  int     seen = 0, expected_seen = 0, pauses_seen = 0;

  always @(posedge clk) if (rst_n) begin
    bit tick;
    tick = (cyc % 8 == 7);
    if (frame_seen) seen++;
    check(frame_seen == load_now, "frame_seen only for valid PDFC frames");
    for (int c = 0; c < 8; c++) begin
      if (load_now && load_en[c]) m_t[c] = load_t[c];
      else if (tick && m_t[c] != 0) m_t[c]--;
    end
    cyc++;
  end

  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < 8; c++) begin
      check(timer[c] == 16'(m_t[c]), $sformatf("timer %0d", c));
      check(paused[c] == (m_t[c] != 0), "paused");
    end
    if (paused != 0) pauses_seen++;
  end

  // kind: 0 valid, 1 data frame, 2 bad FCS, 3 wrong DA, 4 wrong type, 5 wrong opcode, 6 short
  task automatic send(int kind);
    logic [7:0] o[64];
    logic [7:0] en = 8'($urandom);
    logic [7:0][15:0] t;
    int nb = (kind == 6) ? 4 : 8;
    for (int i = 0; i < 64; i++) o[i] = 0;
    for (int c = 0; c < 8; c++) t[c] = ($urandom % 4 == 0) ? 16'h0 : 16'($urandom % 300);
    {o[0], o[1], o[2], o[3], o[4], o[5]} = 48'h0180C2000001;
    {o[6], o[7], o[8], o[9], o[10], o[11]} = 48'h001122334455;
    {o[12], o[13]} = 16'h8808; {o[14], o[15]} = 16'h0101;
    o[17] = en;
    for (int c = 0; c < 8; c++) {o[18 + 2*c], o[19 + 2*c]} = t[c];
    if (kind == 1) for (int i = 0; i < 64; i++) o[i] = 8'($urandom);
    if (kind == 3) o[5] = 8'h02;
    if (kind == 4) o[13] = 8'h00;
    if (kind == 5) o[15] = 8'h02;
    for (int k = 0; k < nb; k++) begin
      @(negedge clk);
      s_valid = 1;
      for (int i = 0; i < 8; i++) s_beat.data[8*i +: 8] = o[8*k + i];
      s_beat.keep = (k == nb - 1) ? 8'h0F : 8'hFF;
      s_beat.last = (k == nb - 1);
      s_beat.user = (k == nb - 1) && (kind != 2);
      load_now = (k == nb - 1) && (kind == 0);
      load_en = en; load_t = t;
    end
    if (kind == 0) expected_seen++;
    @(negedge clk) s_valid = 0; load_now = 0; s_beat = '0;
  endtask

  initial begin
    for (int c = 0; c < 8; c++) m_t[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= 6; k++) send(k);
    for (int n = 0; n < 400; n++) begin
      send(($urandom % 3 == 0) ? 0 : 1 + $urandom % 6);
      repeat ($urandom % 200) @(negedge clk);
    end
    repeat (3000) @(negedge clk);
    check(seen == expected_seen && seen > 50, $sformatf("%0d PDFC frames", seen));
    check(pauses_seen > 0 && paused == 0, "classes paused and released");
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
