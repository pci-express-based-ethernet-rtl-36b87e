// output_addr_lookup: maps the destination MAC address of a received
// Ethernet frame to the PCIe routing address and ID of the adaptor that
// serves that address.
//
// Three parts in a chain: the Ethernet parser pulls the addresses out of the
// first two data phases, the CAM turns the destination address into an
// entry number, and the route array turns the entry number into the 64-bit
// routing address and bus/device/function number.  The parser also reports
// each source MAC address to the driver (src_valid/src_mac), which is how
// the operating system learns which adaptor a station sits behind and builds
// the mapping table; the driver writes the table back through the CAM write
// port (source MAC + CAM address) and the array write port (routing
// information + CAM address).
//
// Flow control: `ready` is the lookup's part of the ready returned to the MAC
// Rx FIFO.  It is low while the parser is idle and while the CAM is busy
// writing, so no header passes the parser during a table update.
//
// Timing: the parser's `complete` pulse is cycle 0; the CAM match is
// registered in cycle 1; the array entry is registered in cycle 2; in cycle
// 3 res_valid pulses with res_match, res_route_addr, res_bdf and res_tc.  The
// result fields hold until the next frame's result.  A match needs both a
// CAM hit and a set valid bit in the array entry; a runt frame never
// matches.
//
// The block structure and the signals between the parts follow the
// document; the cycle-level pipeline is this design's choice.
module output_addr_lookup
  import eth_pcie_pkg::*;
#(
  parameter int CAM_ADDR_W = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // Ethernet data from the MAC Rx FIFO
  input  logic                  in_valid,
  input  logic                  in_ready,
  input  logic [DATA_W-1:0]     in_data,
  input  logic                  in_last,
  output logic                  ready,
  // driver / operating system side
  output logic                  src_valid,
  output logic [MAC_W-1:0]      src_mac,
  input  logic                  cam_we,
  input  logic [MAC_W-1:0]      cam_din,
  input  logic [CAM_ADDR_W-1:0] cam_wr_addr,
  output logic                  cam_busy,
  input  logic                  arr_we,
  input  logic [CAM_ADDR_W-1:0] arr_waddr,
  input  route_entry_t          arr_wdata,
  // result towards the PCIe Tx Interface
  output logic [MAC_W-1:0]      dst_mac,
  output logic [15:0]           len_type,
  output logic                  res_valid,
  output logic                  res_match,
  output logic [CAM_ADDR_W-1:0] res_cam_addr,
  output logic [63:0]           res_route_addr,
  output bdf_t                  res_bdf,
  output logic [2:0]            res_tc
);

  logic complete, runt, vlan, parser_ready;
  logic [2:0] tc;

  eth_parser u_parser (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_last,
    .ready(parser_ready),
    .complete, .runt,
    .dst_mac, .src_mac, .len_type, .vlan, .tc
  );

  assign src_valid = complete & ~runt;
  assign ready     = parser_ready & ~cam_busy;

  logic                  cam_match;
  logic [CAM_ADDR_W-1:0] cam_match_addr;

  mac_cam #(.ADDR_W(CAM_ADDR_W)) u_cam (
    .clk, .rst_n,
    .cmp_din(dst_mac),
    .din(cam_din), .we(cam_we), .wr_addr(cam_wr_addr),
    .busy(cam_busy),
    .match(cam_match), .match_addr(cam_match_addr)
  );

  route_entry_t arr_rdata;

  route_array #(.ADDR_W(CAM_ADDR_W)) u_array (
    .clk, .rst_n,
    .we(arr_we), .waddr(arr_waddr), .wdata(arr_wdata),
    .raddr(cam_match_addr), .rdata(arr_rdata)
  );

  // Align the parser's pulse and the CAM hit with the array output.
  logic                  c1, c2, runt1, runt2, hit2;
  logic [CAM_ADDR_W-1:0] addr2;
  logic [2:0]            tc1, tc2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {c1, c2, runt1, runt2, hit2} <= '0;
      addr2 <= '0;
      tc1   <= '0;
      tc2   <= '0;
    end else begin
      c1    <= complete;
      runt1 <= runt;
      tc1   <= tc;
      c2    <= c1;
      runt2 <= runt1;
      tc2   <= tc1;
      hit2  <= cam_match;
      addr2 <= cam_match_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid      <= 1'b0;
      res_match      <= 1'b0;
      res_cam_addr   <= '0;
      res_route_addr <= '0;
      res_bdf        <= '0;
      res_tc         <= '0;
    end else begin
      res_valid <= c2;
      if (c2) begin
        res_match      <= hit2 & arr_rdata.valid & ~runt2;
        res_cam_addr   <= addr2;
        res_route_addr <= arr_rdata.route_addr;
        res_bdf        <= arr_rdata.bdf;
        res_tc         <= tc2;
      end
    end
  end

endmodule
