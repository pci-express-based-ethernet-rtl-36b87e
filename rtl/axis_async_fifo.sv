// axis_async_fifo: dual-clock AXI4-Stream FIFO.
//
// Used twice in the adaptor: as the MAC Rx FIFO (10G MAC receive clock ->
// PCIe user clock) and as the MAC Tx FIFO (PCIe user clock -> 10G MAC
// transmit clock).  It carries whole data phases (data, keep, last, user) so
// frame boundaries cross the clock domains with the data.
//
// Construction: a 2**ADDR_W entry memory written in the write domain, with
// Gray-coded read and write pointers passed to the opposite domain through
// two-flop synchronisers.  Full and empty are therefore pessimistic for two
// cycles of the observing clock, never optimistic.  The read side is
// first-word-fall-through: m_beat shows the oldest entry whenever m_valid is
// high, and it is consumed on a cycle with m_valid && m_ready.
//
// Interface: s_valid/s_ready/s_beat in wr_clk, m_valid/m_ready/m_beat in
// rd_clk, each side with its own active-low reset (the two resets must both
// be applied together when the FIFO is reset).  wr_count is the write side's
// view of the fill level.
//
// The document takes these FIFOs from the FPGA vendor's AXI4-Stream FIFO and
// gives neither their depth nor their structure; the depth default (512 data
// phases, room for five maximum-size 1518-octet frames) and the Gray-pointer
// construction are this design's choices.
module axis_async_fifo #(
  parameter type beat_t = eth_pcie_pkg::axis_beat_t,
  parameter int  ADDR_W = 9
) (
  input  logic  wr_clk,
  input  logic  wr_rst_n,
  input  logic  s_valid,
  output logic  s_ready,
  input  beat_t s_beat,
  output logic [ADDR_W:0] wr_count,

  input  logic  rd_clk,
  input  logic  rd_rst_n,
  output logic  m_valid,
  input  logic  m_ready,
  output beat_t m_beat
);

  localparam int DEPTH = 1 << ADDR_W;

  beat_t mem [DEPTH];

  logic [ADDR_W:0] wbin, wgray, rbin, rgray;
  logic [ADDR_W:0] rgray_w1, rgray_w2;   // read pointer seen in write domain
  logic [ADDR_W:0] wgray_r1, wgray_r2;   // write pointer seen in read domain

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [ADDR_W:0] gray2bin(input logic [ADDR_W:0] g);
    logic [ADDR_W:0] b;
    b[ADDR_W] = g[ADDR_W];
    for (int i = ADDR_W - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic full, wr_en;
  assign full    = (wgray == {~rgray_w2[ADDR_W:ADDR_W-1], rgray_w2[ADDR_W-2:0]});
  assign s_ready = ~full;
  assign wr_en   = s_valid & ~full;
  assign wr_count = wbin - gray2bin(rgray_w2);

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en) mem[wbin[ADDR_W-1:0]] <= s_beat;
  end

  // ---------------- read domain ----------------
  logic empty, rd_en;
  assign empty   = (rgray == wgray_r2);
  assign m_valid = ~empty;
  assign rd_en   = m_valid & m_ready;
  assign m_beat  = mem[rbin[ADDR_W-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
