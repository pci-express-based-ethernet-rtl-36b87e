// pdfc_queue_monitor: water-level monitor, register and pause-time
// calculation of Priority-based Dynamic Flow Control with Memory (PDFC) for
// one classified queue.
//
// How it works.  The queue length `level` is compared with the operator's
// Low, Middle and High watermarks.  Every RATE_WIN cycles the increase of the
// level over the last window is stored as the rate dL/dt (0 if the level
// fell).  When the level rises through M (or H) the block computes
//   T_M = 32768 * F1(dL/dt) * F2(T_M_real / T_M_last)
//   T_H = 65535 * F3(dL/dt) * F4(T_H_real / T_H_last)
// with F1 = min(1, R1*dL/dt), F3 = min(1, R3*(dL/dt)^2),
// F2 = min(1, R2*T_M_real/T_M_last), F4 likewise with R4, and issues the
// result as a pause request (req_valid, req_high, req_time).  T_x_last is the
// pause time issued at the previous crossing; T_x_real is the measured time,
// in pause quanta, from that crossing until the level fell to L.  While no
// history exists (T_x_last = 0) the ratio factor is taken as 1.
//
// Number formats: R1..R4 are unsigned Q8.16 (65536 = 1.0); rate is in queue
// entries per window; the F factors are Q16 in [0, 65536].  The ratio uses a
// 16-cycle restoring divider; a request appears 18 cycles after the crossing
// (1 cycle when no division is needed).
// A crossing seen while a calculation runs is remembered and served next.
// One pause quantum is 512 bit times = QUANTUM_CYCLES clock cycles
// (8 cycles of a 64-bit data path).
//
// From the document: watermarks H/M/L, equations (1) and (2), the clamping
// of each F at 1, tunable R1..R4, the memory of the last pause time and the
// measured draining time, the 512-bit-time unit.  This design's choices: the
// window length, the fixed-point formats, F = 1 without history, H served
// before M in the same cycle, and the rate being the last full window.
module pdfc_queue_monitor #(
  parameter int LEVEL_W        = 16,
  parameter int RATE_WIN       = 64,
  parameter int QUANTUM_CYCLES = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LEVEL_W-1:0] level,
  input  logic [LEVEL_W-1:0] wm_low,
  input  logic [LEVEL_W-1:0] wm_mid,
  input  logic [LEVEL_W-1:0] wm_high,
  input  logic [23:0]        r1,
  input  logic [23:0]        r2,
  input  logic [23:0]        r3,
  input  logic [23:0]        r4,
  output logic               req_valid,   // pulse
  output logic               req_high,    // 1: T_H, 0: T_M
  output logic [15:0]        req_time,    // pause quanta
  output logic [LEVEL_W-1:0] rate         // dL/dt of the last window
);

  localparam logic [16:0] ONE = 17'h10000;

  // dL/dt
  logic [$clog2(RATE_WIN)-1:0] win_cnt;
  logic [LEVEL_W-1:0]          level_s;

  // pause quanta
  logic [$clog2(QUANTUM_CYCLES)-1:0] q_cnt;
  logic q_tick;
  assign q_tick = (q_cnt == ($bits(q_cnt))'(QUANTUM_CYCLES - 1));

  // crossings and draining times
  logic above_m, above_h, ev_m, ev_h, at_low;
  logic run_m, run_h;
  logic [15:0] cnt_m, cnt_h, treal_m, treal_h, tlast_m, tlast_h;
  assign ev_m   = (level >= wm_mid)  && !above_m;
  assign ev_h   = (level >= wm_high) && !above_h;
  assign at_low = (level <= wm_low);

  // calculation
  typedef enum logic [1:0] {C_IDLE, C_DIV, C_OUT} calc_t;
  calc_t       cstate;
  logic        pend_m, pend_h, is_h;
  logic [16:0] fa, fb;
  logic [15:0] div_d, quot;
  logic [16:0] rem;
  logic [15:0] nlow;
  logic [4:0]  step;

  // start values of a calculation
  logic        start, start_h;
  logic [39:0] f1_raw, n_raw;
  logic [55:0] f3_raw;
  logic [31:0] rate_sq;
  logic [15:0] sel_treal, sel_tlast;
  logic [23:0] sel_r;
  logic [16:0] fa_new;
  assign start   = (cstate == C_IDLE) && (pend_h || pend_m || ev_h || ev_m);
  assign start_h = pend_h || ev_h;
  always_comb begin
    rate_sq   = 32'(rate) * 32'(rate);
    f1_raw    = 40'(r1) * 40'(rate);
    f3_raw    = 56'(r3) * 56'(rate_sq);
    sel_treal = start_h ? treal_h : treal_m;
    sel_tlast = start_h ? tlast_h : tlast_m;
    sel_r     = start_h ? r4 : r2;
    n_raw     = 40'(sel_r) * 40'(sel_treal);
    if (start_h) fa_new = (f3_raw >= 56'(ONE)) ? ONE : f3_raw[16:0];
    else         fa_new = (f1_raw >= 40'(ONE)) ? ONE : f1_raw[16:0];
  end

  // remainder step of the divider
  logic [16:0] rem_sh;
  assign rem_sh = {rem[15:0], nlow[15]};

  logic [33:0] prod;
  logic [49:0] prod_h;
  assign prod   = 34'(fa) * 34'(fb);
  assign prod_h = 50'(prod) * 50'(16'hFFFF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_cnt   <= '0;
      level_s   <= '0;
      rate      <= '0;
      q_cnt     <= '0;
      above_m   <= 1'b0;
      above_h   <= 1'b0;
      run_m     <= 1'b0;
      run_h     <= 1'b0;
      cnt_m     <= '0;
      cnt_h     <= '0;
      treal_m   <= '0;
      treal_h   <= '0;
      tlast_m   <= '0;
      tlast_h   <= '0;
      cstate    <= C_IDLE;
      pend_m    <= 1'b0;
      pend_h    <= 1'b0;
      is_h      <= 1'b0;
      fa        <= '0;
      fb        <= '0;
      div_d     <= '0;
      quot      <= '0;
      rem       <= '0;
      nlow      <= '0;
      step      <= '0;
      req_valid <= 1'b0;
      req_high  <= 1'b0;
      req_time  <= '0;
    end else begin
      req_valid <= 1'b0;

      // rate window
      if (win_cnt == ($bits(win_cnt))'(RATE_WIN - 1)) begin
        win_cnt <= '0;
        rate    <= (level > level_s) ? level - level_s : '0;
        level_s <= level;
      end else begin
        win_cnt <= win_cnt + 1'b1;
      end

      q_cnt <= q_tick ? '0 : q_cnt + 1'b1;

      // watermark crossings; above_x re-arms once the level is below x
      above_m <= (level >= wm_mid);
      above_h <= (level >= wm_high);
      if (ev_m) begin run_m <= 1'b1; cnt_m <= '0; end
      else if (run_m && at_low) begin run_m <= 1'b0; treal_m <= cnt_m; end
      else if (run_m && q_tick && cnt_m != '1) cnt_m <= cnt_m + 1'b1;
      if (ev_h) begin run_h <= 1'b1; cnt_h <= '0; end
      else if (run_h && at_low) begin run_h <= 1'b0; treal_h <= cnt_h; end
      else if (run_h && q_tick && cnt_h != '1) cnt_h <= cnt_h + 1'b1;

      // remember crossings not yet served
      if (ev_m) pend_m <= 1'b1;
      if (ev_h) pend_h <= 1'b1;

      unique case (cstate)
        C_IDLE:
          if (start) begin
            is_h  <= start_h;
            if (start_h) pend_h <= 1'b0;
            else         pend_m <= 1'b0;
            fa    <= fa_new;
            div_d <= sel_tlast;
            if (sel_tlast == '0 || n_raw >= {8'h00, sel_tlast, 16'h0000}) begin
              fb     <= ONE;
              cstate <= C_OUT;
            end else begin
              rem    <= {1'b0, n_raw[31:16]};
              nlow   <= n_raw[15:0];
              quot   <= '0;
              step   <= '0;
              cstate <= C_DIV;
            end
          end
        C_DIV: begin
          if (rem_sh >= {1'b0, div_d}) begin
            rem  <= rem_sh - {1'b0, div_d};
            quot <= {quot[14:0], 1'b1};
          end else begin
            rem  <= rem_sh;
            quot <= {quot[14:0], 1'b0};
          end
          nlow <= {nlow[14:0], 1'b0};
          step <= step + 1'b1;
          if (step == 5'd15) cstate <= C_OUT;
        end
        C_OUT: begin
          if (step == 5'd16) begin
            fb   <= {1'b0, quot};
            step <= '0;
          end else begin
            req_valid <= 1'b1;
            req_high  <= is_h;
            req_time  <= is_h ? prod_h[47:32] : prod[32:17];
            if (is_h) tlast_h <= prod_h[47:32];
            else      tlast_m <= prod[32:17];
            cstate    <= C_IDLE;
          end
        end
        default: cstate <= C_IDLE;
      endcase
    end
  end

endmodule
