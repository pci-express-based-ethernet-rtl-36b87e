// route_array: the "array" half of the address mapping table.
//
// Holds, for each CAM address, the routing information of the adaptor that
// owns that MAC address: valid bit, 2-bit age, 64-bit PCIe routing address
// and bus/device/function number.  The CAM finds the entry number, this
// array returns what the PCIe Tx Interface needs to build the TLP header;
// the split exists because the routing information is too wide to be used as
// a CAM address.
//
// Write port: the driver writes a whole entry with we/waddr/wdata (this is
// also how an entry is deleted or aged: by rewriting its valid and age
// fields).  Read port: raddr is sampled on the clock edge and rdata holds the
// entry from the next cycle (block-RAM style registered read).  Reset clears
// every valid bit; the other fields are undefined until written.
//
// From the document: the entry fields and widths, 16 entries addressed by
// the 4-bit CAM address, and software-managed aging.  Registered read and
// reset behaviour are this design's choices.
module route_array
  import eth_pcie_pkg::*;
#(
  parameter int ADDR_W = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [ADDR_W-1:0]  waddr,
  input  route_entry_t       wdata,
  input  logic [ADDR_W-1:0]  raddr,
  output route_entry_t       rdata
);

  localparam int WORDS = 1 << ADDR_W;

  logic [WORDS-1:0] valid;
  logic [1:0]       age  [WORDS];
  logic [63:0]      addr [WORDS];
  bdf_t             bdf  [WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      rdata <= '0;
    end else begin
      if (we) valid[waddr] <= wdata.valid;
      rdata.valid      <= valid[raddr];
      rdata.age        <= age[raddr];
      rdata.route_addr <= addr[raddr];
      rdata.bdf        <= bdf[raddr];
    end
  end

  always_ff @(posedge clk) begin
    if (we) begin
      age[waddr]  <= wdata.age;
      addr[waddr] <= wdata.route_addr;
      bdf[waddr]  <= wdata.bdf;
    end
  end

endmodule
