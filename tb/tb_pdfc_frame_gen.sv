// tb_pdfc_frame_gen: checks the PDFC frame generator.  Random per-class
// pause requests arrive while a sink with random tready takes the frames.
// Every frame is parsed octet by octet: 8 phases, keep FFh then 0Fh on the
// last, destination 01-80-C2-00-00-01, station address, 8808h, 0101h, the
// class-enable vector and the timers.  A model of the pending set decides
// which classes and timer values each frame must carry, so no request may
// be lost or reported with a stale timer.
// Follows the document: the reserved destination and one timer per class.
// Own choices: the octet layout and the merging of requests.
`timescale 1ns/1ps
module tb_pdfc_frame_gen;
  import eth_pcie_pkg::*;
  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;

  logic [7:0]       req_valid = 0;
  logic [7:0][15:0] req_time = '0;
  logic             m_valid, m_ready = 0, frame_sent;
  axis_beat_t       m_beat;

  pdfc_frame_gen dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // model
  bit [7:0]        pend = 0;
  logic [7:0][15:0] tim = '0;
  typedef struct { bit [7:0] en; logic [7:0][15:0] t; } fr_t;
  fr_t  expq[$];
  logic [7:0] oct[$];
  int   beats = 0, frames = 0, sent_pulses = 0;

  always @(posedge clk) if (rst_n) begin
    bit start;
    start = !m_valid && pend != 0;
    if (start) begin expq.push_back('{en: pend, t: tim}); pend = 0; end
    for (int c = 0; c < 8; c++) if (req_valid[c]) begin pend[c] = 1; tim[c] = req_time[c]; end
    if (frame_sent) sent_pulses++;
    if (m_valid && m_ready) begin
      beats++;
      for (int i = 0; i < 8; i++) if (m_beat.keep[i]) oct.push_back(m_beat.data[8*i +: 8]);
      check(m_beat.keep == (beats == 8 ? 8'h0F : 8'hFF), "keep");
      check(m_beat.last == (beats == 8), "last on the eighth phase");
      if (m_beat.last) begin
        fr_t e;
        frames++;
        check(oct.size() == 60, "60 octets before the FCS");
        if (expq.size() == 0) check(0, "frame without request");
        else begin
          e = expq.pop_front();
          check({oct[0], oct[1], oct[2], oct[3], oct[4], oct[5]} == 48'h0180C2000001, "destination");
          check({oct[6], oct[7], oct[8], oct[9], oct[10], oct[11]} == 48'h020A35000001, "source");
          check({oct[12], oct[13]} == 16'h8808 && {oct[14], oct[15]} == 16'h0101, "type and opcode");
          check(oct[16] == 0 && oct[17] == e.en, $sformatf("class-enable %h expected %h", oct[17], e.en));
          for (int c = 0; c < 8; c++)
            if (e.en[c]) check({oct[18 + 2*c], oct[19 + 2*c]} == e.t[c], $sformatf("timer %0d", c));
          for (int i = 34; i < 60; i++) check(oct[i] == 0, "padding");
        end
        oct.delete();
        beats = 0;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      m_ready = ($urandom % 3 != 0);
      for (int c = 0; c < 8; c++) begin
        req_valid[c] = ($urandom % 40 == 0);
        req_time[c]  = 16'($urandom);
      end
    end
    @(negedge clk) req_valid = 0; m_ready = 1;
    repeat (40) @(negedge clk);
    check(expq.size() == 0 && pend == 0, "all requests sent");
    check(frames > 50 && sent_pulses == frames, $sformatf("%0d frames", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
