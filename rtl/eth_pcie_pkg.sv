// eth_pcie_pkg: types and constants shared by the Ethernet-over-PCIe adaptor.
//
// Byte order convention used everywhere: on the 64-bit AXI4-Stream data bus,
// bits [7:0] carry the octet that is first on the wire.  A MAC address is
// therefore held as the 48-bit value that appears on data[47:0] when the
// address starts a data phase, so the address whose first octet is 01h and
// last octet is 06h is written 48'h060504030201.  Multi-octet protocol fields
// that the network sends most-significant octet first (length/type, TCI,
// PDFC opcode and timers) are byte-swapped when extracted.
//
// The address-mapping-table entry follows the field list of the document's
// mapping table: valid bit, 2-bit age, source MAC, 64-bit routing address and
// the 16-bit bus/device/function number.
package eth_pcie_pkg;

  localparam int DATA_W = 64;
  localparam int KEEP_W = DATA_W / 8;
  localparam int MAC_W  = 48;

  // One AXI4-Stream data phase.  `user` on the MAC receive side means "frame
  // received good" (qualified by last); on the MAC transmit side it means
  // "abandon this frame" (qualified by last).
  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [KEEP_W-1:0] keep;
    logic              last;
    logic              user;
  } axis_beat_t;

  // Bus/device/function number: 8 + 5 + 3 bits.
  typedef struct packed {
    logic [7:0] bus;
    logic [4:0] dev;
    logic [2:0] func;
  } bdf_t;

  // Routing half of a mapping-table entry, kept in the array next to the CAM.
  typedef struct packed {
    logic        valid;
    logic [1:0]  age;
    logic [63:0] route_addr;
    bdf_t        bdf;
  } route_entry_t;

  // Age field codes of a mapping-table entry.
  localparam logic [1:0] AGE_FRESH   = 2'b00;
  localparam logic [1:0] AGE_IDLE    = 2'b01;
  localparam logic [1:0] AGE_EXPIRED = 2'b10;
  localparam logic [1:0] AGE_STATIC  = 2'b11;

  // Ethernet constants.
  localparam logic [15:0] TPID_VLAN      = 16'h8100;
  localparam logic [15:0] ETYPE_MAC_CTRL = 16'h8808;
  localparam logic [15:0] OPCODE_PDFC    = 16'h0101;
  localparam logic [47:0] PAUSE_DA       = 48'h010000C28001; // 01-80-C2-00-00-01

  // TLP header fields (PCIe Base Specification 2.0 layout).
  localparam logic [2:0] FMT_3DW_DATA = 3'b010;
  localparam logic [2:0] FMT_4DW_DATA = 3'b011;
  localparam logic [4:0] TYPE_MEM     = 5'b00000;

  // PCIe Tx Interface states, numbered as in the document.
  typedef enum logic [3:0] {
    TX_IDLE         = 4'd0,
    TX_COUNT_LENGTH = 4'd1,
    TX_SEND_DESC    = 4'd2,
    TX_DISCARD      = 4'd3,
    TX_SEND_DATA    = 4'd4,
    TX_WAIT_ACK     = 4'd5,
    TX_WAIT_FIFO    = 4'd6,
    TX_WAIT_STATE_1 = 4'd7,
    TX_WAIT_STATE_2 = 4'd8,
    TX_LAST_DATA    = 4'd9
  } tx_if_state_t;

  // PCIe Rx Interface states, numbered as in the document.
  typedef enum logic [3:0] {
    RX_IDLE        = 4'd0,
    RX_ACK         = 4'd1,
    RX_WAIT_FIFO_1 = 4'd2,
    RX_WAIT_ABORT  = 4'd3,
    RX_DATA        = 4'd4,
    RX_WAIT_FIFO_2 = 4'd5,
    RX_ABORT       = 4'd6,
    RX_LAST_DATA   = 4'd7,
    RX_ERROR       = 4'd8
  } rx_if_state_t;

  // Fills a 128-bit descriptor: DW0 in [127:96] ... DW3 in [31:0].
  function automatic logic [127:0] mwr_desc(input logic [63:0] addr,
                                            input logic [2:0]  tc,
                                            input logic [9:0]  len_dw,
                                            input logic [15:0] req_id,
                                            input logic [3:0]  last_be,
                                            input logic [3:0]  first_be);
    logic [31:0] dw0, dw1;
    logic        four_dw;
    four_dw = (addr[63:32] != 32'h0);
    dw0 = {(four_dw ? FMT_4DW_DATA : FMT_3DW_DATA), TYPE_MEM, 1'b0, tc,
           4'h0, 1'b0, 1'b0, 2'b00, 2'b00, len_dw};
    dw1 = {req_id, 8'h00, last_be, first_be};
    if (four_dw) return {dw0, dw1, addr[63:32], addr[31:2], 2'b00};
    else         return {dw0, dw1, addr[31:2], 2'b00, 32'h0};
  endfunction

  // Number of valid octets in a data phase whose keep bits are contiguous
  // from bit 0.
  function automatic logic [3:0] keep_bytes(input logic [KEEP_W-1:0] keep);
    logic [3:0] n;
    n = '0;
    for (int i = 0; i < KEEP_W; i++) n += {3'b000, keep[i]};
    return n;
  endfunction

endpackage
