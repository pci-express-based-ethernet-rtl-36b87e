// tb_pdfc_queue_monitor: checks the PDFC pause-time calculation.
// The queue level is driven up and down through the L/M/H watermarks at
// random rates with random R1..R4.  A reference model in this file tracks the
// windowed rate dL/dt, the draining times T_real (in 8-cycle quanta from
// reset) and the last pause times, and evaluates equations (1) and (2) with
// integer arithmetic.  Every request must match the model in type and value,
// T_M must stay within 32768 and T_H within 65535, and the run must see
// clamped factors, divided ratios, both M and H requests and a steady-ramp
// rate check.
// Follows the document: equations (1) and (2) with every factor limited to
// 1.  Own choices: the number formats, window length and watermark values.
`timescale 1ns/1ps
module tb_pdfc_queue_monitor;
  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;

  logic [15:0] level = 0, wm_low = 100, wm_mid = 400, wm_high = 700;
  logic [23:0] r1, r2, r3, r4;
  logic        req_valid, req_high;
  logic [15:0] req_time, rate;

  pdfc_queue_monitor dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // reference model
  longint cyc = 0;
  longint m_rate = 0, m_lvl_s = 0;
  bit     abv_m = 0, abv_h = 0, run_m = 0, run_h = 0;
  longint cnt_m = 0, cnt_h = 0, treal_m = 0, treal_h = 0, tlast_m = 0, tlast_h = 0;
  typedef struct { bit h; longint rate; longint treal; } ev_t;
  ev_t    evq[$];
  int     n_m = 0, n_h = 0, n_div = 0, n_clamp = 0;

  always @(posedge clk) if (rst_n) begin
    bit tick, evm, evh;
    tick = (cyc % 8 == 7);
    evm = (level >= wm_mid) && !abv_m;
    evh = (level >= wm_high) && !abv_h;
    // crossing snapshots use values before this edge
    if (evh) evq.push_back('{h: 1, rate: m_rate, treal: treal_h});
    if (evm) evq.push_back('{h: 0, rate: m_rate, treal: treal_m});
    abv_m = (level >= wm_mid);
    abv_h = (level >= wm_high);
    if (evm) begin run_m = 1; cnt_m = 0; end
    else if (run_m && level <= wm_low) begin run_m = 0; treal_m = cnt_m; end
    else if (run_m && tick && cnt_m != 65535) cnt_m++;
    if (evh) begin run_h = 1; cnt_h = 0; end
    else if (run_h && level <= wm_low) begin run_h = 0; treal_h = cnt_h; end
    else if (run_h && tick && cnt_h != 65535) cnt_h++;
    if (cyc % 64 == 63) begin
      m_rate  = (level > m_lvl_s) ? level - m_lvl_s : 0;
      m_lvl_s = level;
    end
    cyc++;
  end

  function automatic longint clamp1(longint v);
    return (v >= 65536) ? 65536 : v;
  endfunction

  always @(posedge clk) if (rst_n && req_valid) begin
    ev_t e;
    longint fa, fb, n, tl, t;
    if (evq.size() == 0) check(0, "request without crossing");
    else begin
      e  = evq.pop_front();
      tl = e.h ? tlast_h : tlast_m;
      fa = e.h ? clamp1(longint'(r3) * e.rate * e.rate) : clamp1(longint'(r1) * e.rate);
      n  = longint'(e.h ? r4 : r2) * e.treal;
      if (tl == 0 || n >= (tl << 16)) fb = 65536;
      else begin fb = n / tl; n_div++; end
      if (fa == 65536 && fb == 65536) n_clamp++;
      t = e.h ? (fa * fb * 65535) >>> 32 : (fa * fb) >>> 17;
      check(req_high == e.h, "request type");
      check(req_time == 16'(t), $sformatf("%s = %0d expected %0d", e.h ? "T_H" : "T_M", req_time, t));
      check(e.h || req_time <= 32768, "T_M within 32768");
      if (e.h) begin tlast_h = t; n_h++; end
      else     begin tlast_m = t; n_m++; end
    end
  end

  task automatic move_to(int target, int step_max, int every);
    while (level != 16'(target)) begin
      @(negedge clk);
      if ($urandom % every == 0) begin
        int s = 1 + $urandom % step_max;
        if (level < 16'(target)) level = (int'(level) + s > target) ? 16'(target) : level + 16'(s);
        else level = (int'(level) - s < target) ? 16'(target) : level - 16'(s);
      end
    end
  endtask

  initial begin
    r1 = 24'h000400; r2 = 24'h010000; r3 = 24'h000010; r4 = 24'h010000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // steady ramp: 2 entries per cycle gives 128 per 64-cycle window
    repeat (10) begin @(negedge clk); end
    repeat (200) begin @(negedge clk); level = level + 2; end
    check(rate == 128, $sformatf("steady-ramp rate %0d", rate));
    move_to(0, 3, 1);
    repeat (30) @(negedge clk);
    for (int ep = 0; ep < 60; ep++) begin
      if (ep % 10 == 0) begin
        r1 = 24'($urandom % 4096); r2 = 24'(16384 + $urandom % 131072);
        r3 = 24'($urandom % 64);   r4 = 24'(16384 + $urandom % 131072);
      end
      move_to(($urandom % 2) ? 550 : 900, 1 + $urandom % 4, 1 + $urandom % 3);
      repeat ($urandom % 100) @(negedge clk);
      move_to(50, 1 + $urandom % 3, 1 + $urandom % 6);
      repeat (30 + $urandom % 50) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    check(evq.size() == 0, "every crossing answered");
    check(n_m > 20 && n_h > 10, $sformatf("M and H requests (%0d, %0d)", n_m, n_h));
    check(n_div > 5, "ratio divisions exercised");
    check(n_clamp > 0, "clamped factors exercised");
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
