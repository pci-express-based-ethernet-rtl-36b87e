// mac_cam: content-addressable memory holding the source MAC addresses of
// the address mapping table.
//
// A lookup compares CMP_DIN against every stored word in parallel.  The
// result is registered: MATCH and MATCH_ADDR appear on the clock edge after
// CMP_DIN is presented (one-cycle read latency) and follow CMP_DIN every
// cycle.  When several words match, the lowest address is reported.
//
// A write is presented with WE, DIN and WR_ADDR for one cycle.  The CAM takes
// two cycles to complete it: BUSY is high in the cycle after WE, the word is
// replaced at the end of that cycle, and compares see the new word from the
// cycle after BUSY falls.  WE must not be asserted while BUSY is high, so
// consecutive writes are two cycles apart.
//
// Interface: the signals of the document's CAM interface table (CMP_DIN,
// DIN, WE, WR_ADDR, BUSY, MATCH, MATCH_ADDR, CLK) plus an active-low reset
// that marks every word empty, so that nothing matches before the driver has
// written the table.
//
// From the document: the port list, 16 words of 48 bits (4-bit addresses),
// one-cycle reads and two-cycle writes with BUSY.  The document builds the
// CAM from vendor block RAM as a data-by-address bit grid; with 48-bit words
// such a grid is impossible to store directly, so this design holds the words
// in registers with one comparator each, which gives the same interface and
// timing.  The per-word occupied flag is this design's addition.
module mac_cam
  import eth_pcie_pkg::*;
#(
  parameter int ADDR_W = 4,
  parameter int WIDTH  = MAC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WIDTH-1:0]  cmp_din,
  input  logic [WIDTH-1:0]  din,
  input  logic              we,
  input  logic [ADDR_W-1:0] wr_addr,
  output logic              busy,
  output logic              match,
  output logic [ADDR_W-1:0] match_addr
);

  localparam int WORDS = 1 << ADDR_W;

  logic [WIDTH-1:0]  word [WORDS];
  logic [WORDS-1:0]  used;
  logic [WIDTH-1:0]  pend_din;
  logic [ADDR_W-1:0] pend_addr;

  // Parallel compare and priority encode.
  logic [WORDS-1:0]  hit;
  logic              any_hit;
  logic [ADDR_W-1:0] hit_addr;

  always_comb begin
    for (int i = 0; i < WORDS; i++) hit[i] = used[i] && (word[i] == cmp_din);
    any_hit  = |hit;
    hit_addr = '0;
    for (int i = WORDS - 1; i >= 0; i--) if (hit[i]) hit_addr = ADDR_W'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used       <= '0;
      busy       <= 1'b0;
      match      <= 1'b0;
      match_addr <= '0;
      pend_din   <= '0;
      pend_addr  <= '0;
    end else begin
      match      <= any_hit;
      match_addr <= hit_addr;
      if (busy) begin
        busy            <= 1'b0;
        used[pend_addr] <= 1'b1;
      end else if (we) begin
        busy      <= 1'b1;
        pend_din  <= din;
        pend_addr <= wr_addr;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy) word[pend_addr] <= pend_din;
  end

endmodule
