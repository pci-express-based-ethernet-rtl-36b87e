// axis_sync_fifo: single-clock AXI4-Stream FIFO with a synchronous clear.
//
// This is the PCIe Tx FIFO of the receive path.  While the PCIe Tx
// Interface counts the length of an incoming Ethernet frame, the same data
// phases are written here; once the length (and the lookup result) is known
// the interface reads the frame back out as the TLP payload.  If the frame
// is to be dropped, the interface pulses `clear`, which empties the FIFO in
// one cycle (the "discard reset" of the interface's DISCARD state).
//
// Interface: s_valid/s_ready/s_beat write side, m_valid/m_ready/m_beat
// first-word-fall-through read side, all in `clk`.  `count` is the fill
// level.  A write presented in the same cycle as `clear` is dropped.
//
// The document gives this FIFO's role but not its depth; the default of 256
// data phases holds one maximum-size 1518-octet frame (190 phases), which
// is what the store-then-send flow of the PCIe Tx Interface needs.
module axis_sync_fifo #(
  parameter type beat_t = eth_pcie_pkg::axis_beat_t,
  parameter int  ADDR_W = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  s_valid,
  output logic  s_ready,
  input  beat_t s_beat,
  output logic  m_valid,
  input  logic  m_ready,
  output beat_t m_beat,
  output logic [ADDR_W:0] count
);

  localparam int DEPTH = 1 << ADDR_W;

  beat_t mem [DEPTH];
  logic [ADDR_W:0] wptr, rptr;
  logic wr_en, rd_en;

  assign count   = wptr - rptr;
  assign s_ready = (count != DEPTH[ADDR_W:0]) & ~clear;
  assign m_valid = (count != '0);
  assign wr_en   = s_valid & s_ready;
  assign rd_en   = m_valid & m_ready & ~clear;
  assign m_beat  = mem[rptr[ADDR_W-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else if (clear) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_en) wptr <= wptr + 1'b1;
      if (rd_en) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr[ADDR_W-1:0]] <= s_beat;
  end

endmodule
