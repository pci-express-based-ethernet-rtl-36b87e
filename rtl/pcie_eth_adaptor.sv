// pcie_eth_adaptor: Ethernet-over-PCI-Express adaptor card logic.
//
// An Ethernet switch can be built from an off-the-shelf PCI Express switch
// by plugging one adaptor per Ethernet port into it: each adaptor turns the
// Ethernet frames it receives into PCIe memory writes addressed, by
// peer-to-peer address routing, to the adaptor that serves the frame's
// destination MAC address, and turns the memory writes it receives back into
// Ethernet frames.  This module is the adaptation logic between a 10G
// Ethernet MAC core (AXI4-Stream client interface, 64-bit) and a PCIe
// endpoint core (descriptor/data application interface); both cores and
// their PHYs are outside it.
//
// Receive path (Ethernet -> PCIe):
//   MAC Rx FIFO (mac_rx_clk -> user_clk)
//     -> output address lookup (parser, CAM, route array)  } all three watch
//     -> PCIe Tx FIFO                                        } the same data
//     -> PCIe Tx Interface -> endpoint core                  } phases
//   A phase leaves the MAC Rx FIFO only when the lookup and the PCIe Tx
//   Interface are both ready; it is then parsed, counted and stored at once.
// Transmit path (PCIe -> Ethernet):
//   endpoint core -> PCIe Rx Interface -> MAC Tx FIFO (user_clk -> mac_tx_clk)
//   -> MAC core.
//
// Clock domains: MAC receive clock and MAC transmit clock (156.25 MHz for
// 10G), PCIe user clock (125 MHz).  Each domain has its own active-low
// reset; apply all three together.
//
// Driver interface (user_clk): src_valid/src_mac report each source address
// seen; the driver writes the mapping table through the CAM write port and
// the array write port (one write per port at a time, CAM writes at least
// two cycles apart).  fcs_err pulses, and fcs_err_count counts, each frame
// dropped because the MAC found its FCS wrong.  rd_dst_mac, rd_match and rd_tlp_addr show the last
// lookup.  req_id is the adaptor's own bus/device/function number, put in
// the requester ID of every TLP.
//
// PDFC (priority-based dynamic flow control with memory), mac_tx_clk side:
// one queue monitor per class watches that class's queue level
// (pdfc_level, from classified queues outside this module) against the
// L/M/H watermarks and computes a pause time when M or H is crossed; the
// frame generator turns the requests into PDFC frames on pdfc_axis_*, for
// the MAC transmitter.  mac_rx_clk side: the flow control watches every
// received frame and, on a PDFC frame, holds class_paused[c] high for the
// time given for class c.  Merging pdfc_axis_* into the MAC transmit stream
// and holding back paused classes are left to the classified queues.
//
// The block structure and clock-domain split follow the document; widths of
// the internal FIFOs and the exact cycle behaviour are described in each
// sub-module.
module pcie_eth_adaptor
  import eth_pcie_pkg::*;
#(
  parameter int MAC_FIFO_ADDR_W  = 9,
  parameter int PCIE_FIFO_ADDR_W = 8,
  parameter int CAM_ADDR_W       = 4,
  parameter int NCLASS           = 8,
  parameter int LEVEL_W          = 16
) (
  input  logic                  mac_rx_clk,
  input  logic                  mac_rx_rst_n,
  input  logic                  user_clk,
  input  logic                  user_rst_n,
  input  logic                  mac_tx_clk,
  input  logic                  mac_tx_rst_n,

  // 10G MAC receive client (mac_rx_clk)
  input  logic [DATA_W-1:0]     rx_axis_tdata,
  input  logic [KEEP_W-1:0]     rx_axis_tkeep,
  input  logic                  rx_axis_tvalid,
  input  logic                  rx_axis_tlast,
  input  logic                  rx_axis_tuser,
  output logic                  rx_fifo_full,

  // 10G MAC transmit client (mac_tx_clk)
  output logic [DATA_W-1:0]     tx_axis_tdata,
  output logic [KEEP_W-1:0]     tx_axis_tkeep,
  output logic                  tx_axis_tvalid,
  output logic                  tx_axis_tlast,
  output logic                  tx_axis_tuser,
  input  logic                  tx_axis_tready,

  // PCIe endpoint core, transmit interface (user_clk)
  output logic                  tx_req,
  output logic [127:0]          tx_desc,
  input  logic                  tx_ack,
  output logic                  tx_dfr,
  output logic [DATA_W-1:0]     tx_data,
  output logic                  tx_dv,
  output logic [KEEP_W-1:0]     tx_be,
  input  logic                  tx_ws,
  input  logic                  tx_err,

  // PCIe endpoint core, receive interface (user_clk)
  input  logic                  rx_req,
  input  logic [127:0]          rx_desc,
  output logic                  rx_ack,
  input  logic                  rx_dfr,
  input  logic                  rx_dv,
  input  logic [DATA_W-1:0]     rx_data,
  input  logic [KEEP_W-1:0]     rx_be,
  output logic                  rx_ws,
  input  logic                  rx_err,
  output logic                  rx_abort,
  output logic                  rx_err_report,

  // driver / operating system (user_clk)
  input  logic [15:0]           req_id,
  output logic                  src_valid,
  output logic [MAC_W-1:0]      src_mac,
  input  logic                  cam_we,
  input  logic [MAC_W-1:0]      cam_din,
  input  logic [CAM_ADDR_W-1:0] cam_wr_addr,
  output logic                  cam_busy,
  output logic                  fcs_err,         // pulse: frame dropped for a bad FCS
  output logic [15:0]           fcs_err_count,   // frames dropped for a bad FCS
  input  logic                  arr_we,
  input  logic [CAM_ADDR_W-1:0] arr_waddr,
  input  route_entry_t          arr_wdata,

  // observation (user_clk)
  output logic [MAC_W-1:0]      rd_dst_mac,
  output logic                  rd_match,
  output logic [63:0]           rd_tlp_addr,
  output tx_if_state_t          tx_if_state,
  output rx_if_state_t          rx_if_state,
  output logic                  frame_sent,
  output logic                  frame_dropped,
  output logic                  frame_delivered,

  // PDFC, receiver side (mac_tx_clk): classified queue levels and settings
  input  logic [NCLASS-1:0][LEVEL_W-1:0] pdfc_level,
  input  logic [LEVEL_W-1:0]    pdfc_wm_low,
  input  logic [LEVEL_W-1:0]    pdfc_wm_mid,
  input  logic [LEVEL_W-1:0]    pdfc_wm_high,
  input  logic [23:0]           pdfc_r1,
  input  logic [23:0]           pdfc_r2,
  input  logic [23:0]           pdfc_r3,
  input  logic [23:0]           pdfc_r4,
  output logic [NCLASS-1:0]     pdfc_req,        // pulse per class: pause time computed
  output logic [DATA_W-1:0]     pdfc_axis_tdata,  // PDFC frames for the MAC transmitter
  output logic [KEEP_W-1:0]     pdfc_axis_tkeep,
  output logic                  pdfc_axis_tvalid,
  output logic                  pdfc_axis_tlast,
  output logic                  pdfc_axis_tuser,
  input  logic                  pdfc_axis_tready,
  output logic                  pdfc_frame_sent,
  // PDFC, transmitter side (mac_rx_clk)
  output logic [NCLASS-1:0]     class_paused,
  output logic                  pdfc_frame_seen
);

  // ---------------- receive path ----------------
  axis_beat_t mrx_in, mrx_out;
  logic       mrx_s_ready, mrx_valid, mrx_ready;
  logic [MAC_FIFO_ADDR_W:0] mrx_count;

  assign mrx_in = '{data: rx_axis_tdata, keep: rx_axis_tkeep,
                    last: rx_axis_tlast, user: rx_axis_tuser};
  assign rx_fifo_full = ~mrx_s_ready;

  axis_async_fifo #(.beat_t(axis_beat_t), .ADDR_W(MAC_FIFO_ADDR_W)) u_mac_rx_fifo (
    .wr_clk(mac_rx_clk), .wr_rst_n(mac_rx_rst_n),
    .s_valid(rx_axis_tvalid), .s_ready(mrx_s_ready), .s_beat(mrx_in),
    .wr_count(mrx_count),
    .rd_clk(user_clk), .rd_rst_n(user_rst_n),
    .m_valid(mrx_valid), .m_ready(mrx_ready), .m_beat(mrx_out)
  );

  logic lookup_ready, txif_ready;
  assign mrx_ready = lookup_ready & txif_ready;

  // FCS error report: the MAC marks a frame whose FCS check failed by a low
  // tuser on its last phase; the Tx interface drops it, and the driver sees
  // a pulse and a wrapping count of such frames.
  always_ff @(posedge user_clk or negedge user_rst_n)
    if (!user_rst_n) begin
      fcs_err       <= 1'b0;
      fcs_err_count <= '0;
    end else begin
      fcs_err <= mrx_valid & mrx_ready & mrx_out.last & ~mrx_out.user;
      if (mrx_valid & mrx_ready & mrx_out.last & ~mrx_out.user)
        fcs_err_count <= fcs_err_count + 16'd1;
    end

  logic                  res_valid, res_match;
  logic [CAM_ADDR_W-1:0] res_cam_addr;
  logic [63:0]           res_route_addr;
  bdf_t                  res_bdf;
  logic [2:0]            res_tc;
  logic [15:0]           len_type;

  output_addr_lookup #(.CAM_ADDR_W(CAM_ADDR_W)) u_lookup (
    .clk(user_clk), .rst_n(user_rst_n),
    .in_valid(mrx_valid), .in_ready(mrx_ready),
    .in_data(mrx_out.data), .in_last(mrx_out.last),
    .ready(lookup_ready),
    .src_valid, .src_mac,
    .cam_we, .cam_din, .cam_wr_addr, .cam_busy,
    .arr_we, .arr_waddr, .arr_wdata,
    .dst_mac(rd_dst_mac), .len_type,
    .res_valid, .res_match, .res_cam_addr, .res_route_addr, .res_bdf, .res_tc
  );

  assign rd_match    = res_match;
  assign rd_tlp_addr = res_route_addr;

  axis_beat_t ptx_out;
  logic       ptx_wr_en, ptx_s_ready, ptx_valid, ptx_pop, ptx_clear;
  logic [PCIE_FIFO_ADDR_W:0] ptx_count;

  axis_sync_fifo #(.beat_t(axis_beat_t), .ADDR_W(PCIE_FIFO_ADDR_W)) u_pcie_tx_fifo (
    .clk(user_clk), .rst_n(user_rst_n), .clear(ptx_clear),
    .s_valid(ptx_wr_en), .s_ready(ptx_s_ready), .s_beat(mrx_out),
    .m_valid(ptx_valid), .m_ready(ptx_pop), .m_beat(ptx_out),
    .count(ptx_count)
  );

  pcie_tx_if #(.BEAT_W(PCIE_FIFO_ADDR_W + 1)) u_pcie_tx_if (
    .clk(user_clk), .rst_n(user_rst_n),
    .in_valid(mrx_valid), .in_ready(mrx_ready), .in_beat(mrx_out),
    .ready(txif_ready),
    .res_valid, .res_match, .res_route_addr, .res_tc, .req_id,
    .f_full(~ptx_s_ready), .f_wr_en(ptx_wr_en),
    .f_valid(ptx_valid), .f_beat(ptx_out), .f_pop(ptx_pop), .f_clear(ptx_clear),
    .tx_req, .tx_desc, .tx_ack, .tx_dfr, .tx_data, .tx_dv, .tx_be, .tx_ws, .tx_err,
    .state(tx_if_state), .frame_sent, .frame_dropped
  );

  // ---------------- transmit path ----------------
  axis_beat_t prx_out, mtx_out;
  logic       prx_valid, prx_ready;
  logic [MAC_FIFO_ADDR_W:0] mtx_count;

  pcie_rx_if u_pcie_rx_if (
    .clk(user_clk), .rst_n(user_rst_n),
    .rx_req, .rx_desc, .rx_ack, .rx_dfr, .rx_dv, .rx_data, .rx_be,
    .rx_ws, .rx_err, .rx_abort,
    .m_valid(prx_valid), .m_ready(prx_ready), .m_beat(prx_out),
    .state(rx_if_state), .err_report(rx_err_report), .frame_done(frame_delivered)
  );

  axis_async_fifo #(.beat_t(axis_beat_t), .ADDR_W(MAC_FIFO_ADDR_W)) u_mac_tx_fifo (
    .wr_clk(user_clk), .wr_rst_n(user_rst_n),
    .s_valid(prx_valid), .s_ready(prx_ready), .s_beat(prx_out),
    .wr_count(mtx_count),
    .rd_clk(mac_tx_clk), .rd_rst_n(mac_tx_rst_n),
    .m_valid(tx_axis_tvalid), .m_ready(tx_axis_tready), .m_beat(mtx_out)
  );

  assign tx_axis_tdata = mtx_out.data;
  assign tx_axis_tkeep = mtx_out.keep;
  assign tx_axis_tlast = mtx_out.last;
  assign tx_axis_tuser = mtx_out.user;

  // ---------------- PDFC flow control ----------------
  logic [NCLASS-1:0]       mon_high;
  logic [NCLASS-1:0][15:0] mon_time;
  logic [NCLASS-1:0][LEVEL_W-1:0] mon_rate;

  for (genvar c = 0; c < NCLASS; c++) begin : g_mon
    pdfc_queue_monitor #(.LEVEL_W(LEVEL_W)) u_mon (
      .clk(mac_tx_clk), .rst_n(mac_tx_rst_n),
      .level(pdfc_level[c]), .wm_low(pdfc_wm_low), .wm_mid(pdfc_wm_mid), .wm_high(pdfc_wm_high),
      .r1(pdfc_r1), .r2(pdfc_r2), .r3(pdfc_r3), .r4(pdfc_r4),
      .req_valid(pdfc_req[c]), .req_high(mon_high[c]), .req_time(mon_time[c]),
      .rate(mon_rate[c])
    );
  end

  axis_beat_t pdfc_out;

  pdfc_frame_gen #(.NCLASS(NCLASS)) u_pdfc_gen (
    .clk(mac_tx_clk), .rst_n(mac_tx_rst_n),
    .req_valid(pdfc_req), .req_time(mon_time),
    .m_valid(pdfc_axis_tvalid), .m_ready(pdfc_axis_tready), .m_beat(pdfc_out),
    .frame_sent(pdfc_frame_sent)
  );

  assign pdfc_axis_tdata = pdfc_out.data;
  assign pdfc_axis_tkeep = pdfc_out.keep;
  assign pdfc_axis_tlast = pdfc_out.last;
  assign pdfc_axis_tuser = pdfc_out.user;

  logic [NCLASS-1:0][15:0] pause_timer;

  pdfc_flow_ctrl #(.NCLASS(NCLASS)) u_pdfc_fc (
    .clk(mac_rx_clk), .rst_n(mac_rx_rst_n),
    .s_valid(rx_axis_tvalid), .s_beat(mrx_in),
    .paused(class_paused), .timer(pause_timer), .frame_seen(pdfc_frame_seen)
  );

endmodule
