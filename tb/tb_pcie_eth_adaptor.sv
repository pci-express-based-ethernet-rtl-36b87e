// tb_pcie_eth_adaptor: end-to-end test of the adaptor in loopback.
//
// The PCIe transmit interface of the adaptor is wired back to its own PCIe
// receive interface, as if the endpoint core delivered every TLP straight
// back (tx_ack from rx_ack, tx_ws from rx_ws).  Ethernet frames are driven
// into the MAC receive client at 156.25 MHz, the PCIe side runs at 125 MHz
// and the MAC transmit client at 156.25 MHz with its own phase.  The driver
// writes two mapping-table entries first: station 06:05:04:03:02:01 behind
// the adaptor at 0x00000300_0000000C (bus 5) and station 01:02:03:04:05:06
// (as written on the 48-bit bus) behind 0x00000500_0000000C (bus 7).
//
// Checks: every TLP descriptor (format, type, TC, length, byte enables,
// requester ID, address) and payload against values computed here from the
// frame; every frame leaving the MAC transmit client against the frame that
// went in; that frames with no table match or a bad FCS are dropped; that a
// PCIe error mid-payload closes the frame towards the MAC with `user`; that
// an unsupported TLP is aborted.  Each mechanism of the design is counted and
// a mechanism that never happened is a failure: no-match discard, bad-frame
// discard, FCS error report, WAIT_ACK, WAIT_STATE_1, WAIT_STATE_2, MAC Tx FIFO back-pressure
// (WAIT_FIFO_2), CAM-busy stall, VLAN priority to TC, error cancel, abort.
// PDFC: the class-3 queue level is ramped through the M and H watermarks; the
// pause requests and the PDFC frames are checked against equations (1) and
// (2) worked out by hand, the frames are looped back into the MAC receive
// client, and class 3 must be suspended for the T_H quanta and then resume
// (mechanisms: pause at M, pause at H, frame sent, frame received, resume).
// The stimulus starts with the four frames of the document's simulation.
// The top runs with its default parameters.
`timescale 1ns/1ps
module tb_pcie_eth_adaptor;
  import eth_pcie_pkg::*;

  typedef logic [7:0] byte_q_t[$];

  logic mac_rx_clk = 0, user_clk = 0, mac_tx_clk = 0;
  logic mac_rx_rst_n = 0, user_rst_n = 0, mac_tx_rst_n = 0;
  always #3.2 mac_rx_clk = ~mac_rx_clk;
  always #4.0 user_clk   = ~user_clk;
  initial begin #1.1; forever #3.2 mac_tx_clk = ~mac_tx_clk; end

  logic [63:0] rx_axis_tdata = '0;
  logic [7:0]  rx_axis_tkeep = '0;
  logic        rx_axis_tvalid = 0, rx_axis_tlast = 0, rx_axis_tuser = 0;
  logic        rx_fifo_full;
  logic [63:0] tx_axis_tdata;
  logic [7:0]  tx_axis_tkeep;
  logic        tx_axis_tvalid, tx_axis_tlast, tx_axis_tuser;
  logic        tx_axis_tready = 0;

  logic         tx_req, tx_ack, tx_dfr, tx_dv, tx_ws, tx_err;
  logic [127:0] tx_desc;
  logic [63:0]  tx_data;
  logic [7:0]   tx_be;
  logic         rx_req, rx_ack, rx_dfr, rx_dv, rx_ws, rx_err, rx_abort, rx_err_report;
  logic [127:0] rx_desc;
  logic [63:0]  rx_data;
  logic [7:0]   rx_be;

  logic [15:0]  req_id = 16'h0300;
  logic         src_valid;
  logic [47:0]  src_mac;
  logic         cam_we = 0, cam_busy;
  logic         fcs_err;
  logic [15:0]  fcs_err_count;
  logic [47:0]  cam_din = '0;
  logic [3:0]   cam_wr_addr = '0;
  logic         arr_we = 0;
  logic [3:0]   arr_waddr = '0;
  route_entry_t arr_wdata = '0;
  logic [47:0]  rd_dst_mac;
  logic         rd_match;
  logic [63:0]  rd_tlp_addr;
  tx_if_state_t tx_if_state;
  rx_if_state_t rx_if_state;
  logic         frame_sent, frame_dropped, frame_delivered;

  // PDFC
  logic [7:0][15:0] pdfc_level = '0;
  logic [15:0] pdfc_wm_low = 16'd100, pdfc_wm_mid = 16'd400, pdfc_wm_high = 16'd700;
  logic [23:0] pdfc_r1 = 24'h000010, pdfc_r2 = 24'h010000, pdfc_r3 = 24'h000001, pdfc_r4 = 24'h010000;
  logic [7:0]  pdfc_req, class_paused;
  logic [63:0] pdfc_axis_tdata;
  logic [7:0]  pdfc_axis_tkeep;
  logic        pdfc_axis_tvalid, pdfc_axis_tlast, pdfc_axis_tuser, pdfc_axis_tready = 0;
  logic        pdfc_frame_sent, pdfc_frame_seen;

  // loopback with fault injection and a direct-drive override for the abort test
  logic         ws_inj = 0, err_inj = 0, tb_drive_rx = 0;
  logic         tb_rx_req = 0;
  logic [127:0] tb_rx_desc = '0;
  assign tx_ack  = rx_ack;
  assign tx_ws   = rx_ws | ws_inj;
  assign tx_err  = err_inj;
  assign rx_err  = err_inj;
  assign rx_req  = tb_drive_rx ? tb_rx_req  : tx_req;
  assign rx_desc = tb_drive_rx ? tb_rx_desc : tx_desc;
  assign rx_dfr  = tb_drive_rx ? 1'b0 : tx_dfr;
  assign rx_dv   = tb_drive_rx ? 1'b0 : (tx_dv & ~ws_inj);
  assign rx_data = tx_data;
  assign rx_be   = tx_be;

  pcie_eth_adaptor dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- frames ----------------
  byte_q_t frames[64];
  int      nframes = 0;

  function automatic void push_word(int id, logic [31:0] w, int nbytes);
    for (int i = 0; i < nbytes; i++) frames[id].push_back(w[8*i +: 8]);
  endfunction

  function automatic int alt_frame(logic [31:0] w0, logic [31:0] w1, logic [31:0] w2,
                                   logic [31:0] w3, logic [31:0] ev, logic [31:0] od,
                                   int nalt);
    int id = nframes++;
    push_word(id, w0, 4); push_word(id, w1, 4); push_word(id, w2, 4); push_word(id, w3, 4);
    for (int k = 4; k < 4 + nalt; k++) push_word(id, (k % 2 == 0) ? ev : od, 4);
    return id;
  endfunction

  function automatic int gen_frame(logic [47:0] da, logic [15:0] etype, int len,
                                   bit vlan, logic [2:0] pcp);
    int id = nframes++;
    for (int i = 0; i < 6; i++) frames[id].push_back(da[8*i +: 8]);
    for (int i = 0; i < 6; i++) frames[id].push_back(8'h10 + 8'(i));
    if (vlan) begin
      frames[id].push_back(8'h81); frames[id].push_back(8'h00);
      frames[id].push_back({pcp, 5'h00}); frames[id].push_back(8'h2A);
    end
    frames[id].push_back(etype[15:8]); frames[id].push_back(etype[7:0]);
    while (frames[id].size() < len) frames[id].push_back(8'($urandom));
    return id;
  endfunction

  // ---------------- expectations ----------------
  int          exp_tlp_id[$];
  logic [63:0] exp_tlp_addr[$];
  logic [2:0]  exp_tlp_tc[$];
  int          exp_eth_id[$];
  bit          exp_eth_abort[$];

  // ---------------- MAC receive driver ----------------
  task automatic send_frame(int id, bit good);
    int n = frames[id].size();
    int nb = (n + 7) / 8;
    for (int b = 0; b < nb; b++) begin
      logic [63:0] d = '0;
      logic [7:0]  k = '0;
      for (int i = 0; i < 8; i++)
        if (8*b + i < n) begin d[8*i +: 8] = frames[id][8*b + i]; k[i] = 1'b1; end
      @(posedge mac_rx_clk);
      rx_axis_tvalid <= 1'b1;
      rx_axis_tdata  <= d;
      rx_axis_tkeep  <= k;
      rx_axis_tlast  <= (b == nb - 1);
      rx_axis_tuser  <= (b == nb - 1) ? good : 1'b0;
    end
    @(posedge mac_rx_clk);
    rx_axis_tvalid <= 1'b0;
    rx_axis_tlast  <= 1'b0;
    repeat (3) @(posedge mac_rx_clk);
  endtask

  // ---------------- driver writes of the mapping table ----------------
  task automatic write_entry(logic [3:0] a, logic [47:0] mac, logic [63:0] route,
                             logic [7:0] bus, bit valid);
    @(posedge user_clk);
    while (cam_busy) @(posedge user_clk);
    cam_we <= 1'b1; cam_din <= mac; cam_wr_addr <= a;
    arr_we <= 1'b1; arr_waddr <= a;
    arr_wdata <= '{valid: valid, age: AGE_FRESH, route_addr: route,
                   bdf: '{bus: bus, dev: 5'd0, func: 3'd0}};
    @(posedge user_clk);
    cam_we <= 1'b0; arr_we <= 1'b0;
    @(posedge user_clk);
  endtask

  // ---------------- TLP monitor (PCIe transmit interface) ----------------
  logic [127:0] cur_desc;
  byte_q_t      cur_pay;
  int           tlps = 0;
  int           m_id;
  logic [63:0]  m_a;
  logic [2:0]   m_tc;

  function automatic logic [127:0] expect_desc(int id, logic [63:0] addr, logic [2:0] tc);
    int nbytes = frames[id].size();
    int ndw = (nbytes + 3) / 4;
    int tail = nbytes % 4;
    logic [3:0] tmask = (tail == 0) ? 4'hF : (tail == 1) ? 4'h1 : (tail == 2) ? 4'h3 : 4'h7;
    logic [3:0] fbe = (ndw == 1) ? tmask : 4'hF;
    logic [3:0] lbe = (ndw == 1) ? 4'h0 : tmask;
    logic [31:0] dw0, dw1;
    bit four = (addr[63:32] != 0);
    dw0 = {(four ? 3'b011 : 3'b010), 5'b00000, 1'b0, tc, 4'h0, 4'h0, 2'b00, 10'(ndw)};
    dw1 = {req_id, 8'h00, lbe, fbe};
    return four ? {dw0, dw1, addr[63:32], addr[31:0]} : {dw0, dw1, addr[31:0], 32'h0};
  endfunction

  always @(posedge user_clk) begin
    if (user_rst_n && !tb_drive_rx) begin
      if (tx_req && tx_ack) begin
        cur_desc = tx_desc;
        cur_pay.delete();
      end
      if (tx_err && (tx_dv || tx_dfr)) begin
        cur_pay.delete();
      end else if (tx_dv && !tx_ws) begin
        for (int i = 0; i < 8; i++) if (tx_be[i]) cur_pay.push_back(tx_data[8*i +: 8]);
        if (!tx_dfr) begin
          tlps++;
          if (exp_tlp_id.size() == 0) check(0, "unexpected TLP");
          else begin
            m_id = exp_tlp_id.pop_front();
            m_a  = exp_tlp_addr.pop_front();
            m_tc = exp_tlp_tc.pop_front();
            check(cur_desc == expect_desc(m_id, m_a, m_tc),
                  $sformatf("TLP %0d descriptor %h, expected %h", m_id, cur_desc, expect_desc(m_id, m_a, m_tc)));
            check(cur_pay == frames[m_id], $sformatf("TLP %0d payload", m_id));
          end
        end
      end
    end
  end

  // ---------------- MAC transmit monitor ----------------
  byte_q_t out_frame;
  int      eth_out = 0, eth_aborted = 0;
  int      e_id;
  bit      e_ab;
  always @(posedge mac_tx_clk) begin
    if (mac_tx_rst_n && tx_axis_tvalid && tx_axis_tready) begin
      for (int i = 0; i < 8; i++) if (tx_axis_tkeep[i]) out_frame.push_back(tx_axis_tdata[8*i +: 8]);
      if (tx_axis_tlast) begin
        if (exp_eth_id.size() == 0) check(0, "unexpected frame at MAC transmit client");
        else begin
          e_id = exp_eth_id.pop_front();
          e_ab = exp_eth_abort.pop_front();
          if (e_ab) begin
            eth_aborted++;
            check(tx_axis_tuser == 1'b1, "cancelled frame closed with user");
          end else begin
            eth_out++;
            check(tx_axis_tuser == 1'b0, $sformatf("frame %0d user clear", e_id));
            check(out_frame == frames[e_id], $sformatf("frame %0d bytes at MAC transmit client", e_id));
          end
        end
        out_frame.delete();
      end
    end
  end

  // MAC transmit ready: random, or held low by the back-pressure test
  logic hold_tready = 0;
  always @(posedge mac_tx_clk) tx_axis_tready <= !hold_tready && ($urandom % 4 != 0);

  // ---------------- PDFC frame capture ----------------
  byte_q_t pdfc_cap;
  int      pdfc_ids[$];
  int      n_pdfc_req_m = 0, n_pdfc_req_h = 0, n_pdfc_frames = 0, n_pdfc_seen = 0;
  int      n_pause_cycles = 0, n_release = 0, pid;
  bit      paused3_q = 0;
  always @(posedge mac_tx_clk) begin
    pdfc_axis_tready <= ($urandom % 3 != 0);
    if (mac_tx_rst_n) begin
      for (int c = 0; c < 8; c++)
        if (pdfc_req[c]) begin
          if (dut.g_mon[3].u_mon.req_high && c == 3) n_pdfc_req_h++;
          else n_pdfc_req_m++;
        end
      if (pdfc_axis_tvalid && pdfc_axis_tready) begin
        for (int i = 0; i < 8; i++) if (pdfc_axis_tkeep[i]) pdfc_cap.push_back(pdfc_axis_tdata[8*i +: 8]);
        if (pdfc_axis_tlast) begin
          n_pdfc_frames++;
          pid = nframes++;
          frames[pid] = pdfc_cap;
          pdfc_ids.push_back(pid);
          pdfc_cap.delete();
        end
      end
    end
  end
  always @(posedge mac_rx_clk) if (mac_rx_rst_n) begin
    if (pdfc_frame_seen) n_pdfc_seen++;
    if (class_paused[3]) n_pause_cycles++;
    if (paused3_q && !class_paused[3]) n_release++;
    paused3_q <= class_paused[3];
    check((class_paused & 8'hF7) == 0, "only class 3 paused");
  end

  // ---------------- mechanism counters ----------------
  int n_nomatch = 0, n_bad = 0, n_wait_ack = 0, n_ws1 = 0, n_ws2 = 0, n_fifo2 = 0;
  int n_cam_stall = 0, n_vlan = 0, n_err = 0, n_abort = 0, n_sent = 0, n_drop = 0, n_src = 0, n_fcs = 0;
  always @(posedge user_clk) if (user_rst_n) begin
    if (tx_if_state == TX_WAIT_ACK)     n_wait_ack++;
    if (tx_if_state == TX_WAIT_STATE_1) n_ws1++;
    if (tx_if_state == TX_WAIT_STATE_2) n_ws2++;
    if (rx_if_state == RX_WAIT_FIFO_2 || rx_if_state == RX_WAIT_FIFO_1) n_fifo2++;
    if (rx_if_state == RX_ERROR)        n_err++;
    if (rx_abort)                       n_abort++;
    if (cam_busy && dut.mrx_valid && dut.u_pcie_tx_if.ready) n_cam_stall++;
    if (frame_sent)    n_sent++;
    if (frame_dropped) n_drop++;
    if (fcs_err)       n_fcs++;
    if (src_valid)     n_src++;
    if (tx_req && tx_ack && tx_desc[118:116] != 3'd0) n_vlan++;
  end

  task automatic wait_idle(int cycles);
    int quiet = 0;
    while (quiet < cycles) begin
      @(posedge user_clk);
      if (tx_if_state == TX_IDLE && rx_if_state == RX_IDLE && !dut.mrx_valid) quiet++;
      else quiet = 0;
    end
  endtask

  task automatic expect_fwd(int id, logic [63:0] addr, logic [2:0] tc);
    exp_tlp_id.push_back(id); exp_tlp_addr.push_back(addr); exp_tlp_tc.push_back(tc);
    exp_eth_id.push_back(id); exp_eth_abort.push_back(1'b0);
  endtask

  localparam logic [63:0] ADDR3 = 64'h00000300_0000000C;
  localparam logic [63:0] ADDR5 = 64'h00000500_0000000C;
  localparam logic [63:0] ADDR9 = 64'h00000900_0000000C;
  localparam logic [47:0] MAC_A = 48'h060504030201;
  localparam logic [47:0] MAC_B = 48'h010203040506;
  localparam logic [47:0] MAC_C = 48'h0A0B0C0D0E02;

  int f0, f1, f2, f3, fv, fu, fb[4], fc, fe, fd;
  int drops_before;

  initial begin
    // Frames 0..3 of the document's stimulus (data words, first octet in bits 7:0).
    f0 = alt_frame(32'h04030201, 32'h02020605, 32'h06050403, 32'h55AA2E00,
                   32'hAA55AA55, 32'h55AA55AA, 11);
    f1 = alt_frame(32'h03040506, 32'h05060102, 32'h02020304, 32'hEE110080,
                   32'h11EE11EE, 32'hEE11EE11, 17);
    push_word(f1, 32'h0000EE11, 2);
    f2 = alt_frame(32'h04030201, 32'h02020605, 32'h06050403, 32'h55AA2E80,
                   32'hAA55AA55, 32'h55AA55AA, 16);
    f3 = alt_frame(32'h03040506, 32'h05060102, 32'h02020304, 32'hEE111500,
                   32'h11EE11EE, 32'hEE11EE11, 4);
    push_word(f3, 32'h00EE11EE, 4);
    for (int k = 0; k < 6; k++) push_word(f3, 32'h0, 4);
    fv = gen_frame(MAC_A, 16'h0800, 64, 1'b1, 3'd5);
    fu = gen_frame(48'hFFEEDDCCBBAA, 16'h0800, 60, 1'b0, 3'd0);
    for (int k = 0; k < 4; k++) fb[k] = gen_frame(MAC_B, 16'h0800, 1514, 1'b0, 3'd0);
    fc = gen_frame(MAC_C, 16'h86DD, 100, 1'b0, 3'd0);
    fe = gen_frame(MAC_A, 16'h0800, 200, 1'b0, 3'd0);
    fd = gen_frame(MAC_C, 16'h0800, 70, 1'b0, 3'd0);

    repeat (5) @(posedge user_clk);
    mac_rx_rst_n = 1; user_rst_n = 1; mac_tx_rst_n = 1;
    repeat (5) @(posedge user_clk);
    write_entry(4'd0, MAC_A, ADDR3, 8'h05, 1'b1);
    write_entry(4'd1, MAC_B, ADDR5, 8'h07, 1'b1);

    // --- the four frames of the document's simulation ---
    expect_fwd(f0, ADDR3, 3'd0);
    expect_fwd(f1, ADDR5, 3'd0);
    expect_fwd(f3, ADDR5, 3'd0);
    send_frame(f0, 1'b1);
    send_frame(f1, 1'b1);
    send_frame(f2, 1'b0);           // FCS error reported by the MAC: dropped
    send_frame(f3, 1'b1);
    wait_idle(50);
    n_bad = n_drop;
    check(n_drop == 1, "frame 2 with bad FCS dropped");
    check(n_fcs == 1 && fcs_err_count == 16'd1, "bad FCS reported to the driver");
    check(rd_tlp_addr == ADDR5 && rd_match, "last lookup result");

    // --- VLAN priority and an unknown destination ---
    expect_fwd(fv, ADDR3, 3'd5);
    send_frame(fv, 1'b1);
    send_frame(fu, 1'b1);           // no table entry: dropped
    wait_idle(50);
    n_nomatch = n_drop - 1;
    check(n_nomatch == 1, "unknown destination dropped");

    // --- wait states injected by the core ---
    fork
      begin
        expect_fwd(f0, ADDR3, 3'd0);
        expect_fwd(f1, ADDR5, 3'd0);
        expect_fwd(f3, ADDR5, 3'd0);
        send_frame(f0, 1'b1);
        send_frame(f1, 1'b1);
        send_frame(f3, 1'b1);
        wait_idle(50);
      end
      begin
        repeat (400) begin @(posedge user_clk); ws_inj <= ($urandom % 3 == 0) || (tx_if_state == TX_COUNT_LENGTH); end
        ws_inj <= 1'b0;
      end
    join
    wait_idle(50);

    // --- full-size frames against a stalled MAC transmit client ---
    hold_tready = 1;
    for (int k = 0; k < 3; k++) begin
      int sent0 = n_sent;
      int guard = 0;
      expect_fwd(fb[k], ADDR5, 3'd0);
      send_frame(fb[k], 1'b1);
      while (n_sent == sent0 && guard < 3000) begin @(posedge user_clk); guard++; end
    end
    repeat (2000) @(posedge user_clk);
    check(dut.u_mac_tx_fifo.s_ready == 1'b0, "MAC Tx FIFO filled while the MAC is stalled");
    hold_tready = 0;
    wait_idle(100);
    repeat (300) @(posedge mac_tx_clk);

    // --- table update while traffic flows: CAM busy stall ---
    fork
      send_frame(fb[3], 1'b1);
      begin repeat (20) @(posedge user_clk); write_entry(4'd2, MAC_C, ADDR9, 8'h09, 1'b1); end
    join
    expect_fwd(fb[3], ADDR5, 3'd0);
    wait_idle(50);
    expect_fwd(fc, ADDR9, 3'd0);
    send_frame(fc, 1'b1);
    wait_idle(50);

    // --- entry deleted by clearing its valid bit ---
    drops_before = n_drop;
    write_entry(4'd2, MAC_C, ADDR9, 8'h09, 1'b0);
    send_frame(fd, 1'b1);
    wait_idle(50);
    check(n_drop == drops_before + 1, "frame to a deleted entry dropped");

    // --- PCIe error in the middle of a payload ---
    exp_eth_id.push_back(fe); exp_eth_abort.push_back(1'b1);
    drops_before = n_drop;
    fork
      send_frame(fe, 1'b1);
      begin
        @(posedge user_clk);
        while (tx_if_state != TX_SEND_DATA) @(posedge user_clk);
        repeat (3) @(posedge user_clk);
        err_inj <= 1'b1;
        repeat (2) @(posedge user_clk);
        err_inj <= 1'b0;
      end
    join
    wait_idle(50);
    check(n_drop == drops_before + 1, "TLP cancelled by the core's error is discarded");

    // --- unsupported TLP: configuration read descriptor ---
    tb_drive_rx <= 1'b1;
    @(posedge user_clk);
    tb_rx_desc <= {3'b000, 5'b00100, 120'h0};
    tb_rx_req  <= 1'b1;
    @(posedge user_clk);
    while (!rx_abort) begin
      check(!rx_ack, "unsupported TLP not acknowledged");
      @(posedge user_clk);
    end
    tb_rx_req <= 1'b0;
    repeat (4) @(posedge user_clk);
    tb_drive_rx <= 1'b0;

    // --- PDFC: class-3 queue rises through M and H at one entry per cycle ---
    // rate 64 per 64-cycle window: F1 = 64*16/65536, T_M = 32768/64 = 512;
    // F3 = 64*64*1/65536 = 1/16, T_H = 65535/16 = 4095 (floor); F2 = F4 = 1.
    repeat (10) @(posedge mac_tx_clk);
    for (int l = 1; l <= 760; l++) @(posedge mac_tx_clk) pdfc_level[3] <= 16'(l);
    repeat (100) @(posedge mac_tx_clk);
    check(n_pdfc_req_m == 1 && n_pdfc_req_h == 1, "one M and one H pause request");
    check(pdfc_ids.size() >= 1, "PDFC frame generated");
    while (pdfc_ids.size() != 0) begin
      pid = pdfc_ids.pop_front();
      check(frames[pid].size() == 60, "PDFC frame is 60 octets");
      check({frames[pid][0], frames[pid][1], frames[pid][2]} == 24'h0180C2 &&
            {frames[pid][12], frames[pid][13], frames[pid][14], frames[pid][15]} == 32'h88080101,
            "PDFC frame address, type and opcode");
      check(frames[pid][17] == 8'h08, "class-enable vector names class 3");
      check({frames[pid][24], frames[pid][25]} == 16'd512 || {frames[pid][24], frames[pid][25]} == 16'd4095,
            $sformatf("class-3 timer %0d", {frames[pid][24], frames[pid][25]}));
      if (pdfc_ids.size() == 0)
        check({frames[pid][24], frames[pid][25]} == 16'd4095, "last PDFC frame carries T_H");
      send_frame(pid, 1'b1);    // looped back as if from the link partner; no table entry
    end
    @(posedge mac_rx_clk);
    check(class_paused[3], "class 3 suspended by the received PDFC frame");
    pdfc_level[3] <= 16'd0;
    n_pause_cycles = 0;
    while (class_paused[3]) @(posedge mac_rx_clk);
    check(n_pause_cycles >= 4094 * 8 && n_pause_cycles <= 4095 * 8 + 1,
          $sformatf("pause lasted %0d cycles for 4095 quanta", n_pause_cycles));
    wait_idle(50);

    repeat (500) @(posedge mac_tx_clk);
    check(exp_tlp_id.size() == 0, "every expected TLP seen");
    check(exp_eth_id.size() == 0, "every expected frame at the MAC transmit client");
    check(n_src >= 10, "source addresses reported to the driver");

    check(n_nomatch > 0, "mechanism: no-match discard");
    check(n_bad > 0, "mechanism: bad-frame discard");
    check(n_fcs > 0, "mechanism: FCS error report");
    check(n_wait_ack > 0, "mechanism: WAIT_ACK");
    check(n_ws1 > 0, "mechanism: WAIT_STATE_1");
    check(n_ws2 > 0, "mechanism: WAIT_STATE_2");
    check(n_fifo2 > 0, "mechanism: MAC Tx FIFO back-pressure");
    check(n_cam_stall > 0, "mechanism: CAM busy stall");
    check(n_vlan > 0, "mechanism: VLAN priority to TC");
    check(n_err > 0, "mechanism: error cancel");
    check(n_abort > 0, "mechanism: abort");
    check(n_pdfc_req_m > 0, "mechanism: PDFC pause time at M");
    check(n_pdfc_req_h > 0, "mechanism: PDFC pause time at H");
    check(n_pdfc_frames > 0, "mechanism: PDFC frame sent");
    check(n_pdfc_seen > 0, "mechanism: PDFC frame received");
    check(n_release > 0, "mechanism: paused class resumed");
    $display("mechanisms: nomatch=%0d bad=%0d wait_ack=%0d ws1=%0d ws2=%0d fifo_wait=%0d cam_stall=%0d vlan=%0d err=%0d abort=%0d tlps=%0d eth=%0d",
             n_nomatch, n_bad, n_wait_ack, n_ws1, n_ws2, n_fifo2, n_cam_stall, n_vlan, n_err, n_abort, tlps, eth_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge user_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
