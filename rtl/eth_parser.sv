// eth_parser: Ethernet header parser of the output address lookup.
//
// Watches the 64-bit data phases leaving the MAC Rx FIFO and extracts the
// destination MAC address, the source MAC address and the length/type field.
// The preamble and SFD are already removed, so the first data phase starts
// with the destination address: phase 1 holds the 48-bit destination address
// and the first 16 bits of the source address, phase 2 holds the remaining 32
// source-address bits and the length/type octets (octets 12-13), followed by
// octets 14-15.
//
// The parser is VLAN aware: when octets 12-13 hold the customer VLAN TPID
// (8100h), octets 14-15 are the TCI and its 3-bit priority code point is
// converted to a PCIe traffic class through the PCP_TO_TC table; an untagged
// frame gets traffic class 0.
//
// FSM (four states, as in the document): IDLE waits for a valid data phase,
// READ_WORD_1 and READ_WORD_2 take the first two phases, WAIT_LAST waits for
// the phase with `last`.  The parser is not ready while in IDLE, so the first
// data phase is held by the FIFO for one cycle before it is taken.
//
// Timing: `complete` is a one-cycle pulse in the cycle after phase 2 is
// accepted, with dst_mac/src_mac/len_type/vlan/tc valid from then until the
// next frame's phase 2.  A frame that ends in its first phase gives
// `complete` together with `runt`, and its fields must not be used.
// `complete` doubles as the report of the source address to the driver.
//
// From the document: the field positions, the four states, the VLAN test and
// the TC0 default.  This design's choices: a `ready` that is low only in
// IDLE, the runt flag, and the identity PCP-to-TC table default.
module eth_parser
  import eth_pcie_pkg::*;
#(
  parameter logic [7:0][2:0] PCP_TO_TC = {3'd7, 3'd6, 3'd5, 3'd4, 3'd3, 3'd2, 3'd1, 3'd0}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_ready,     // combined ready seen by the FIFO
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_last,
  output logic              ready,        // parser's own contribution to ready
  output logic              complete,
  output logic              runt,
  output logic [MAC_W-1:0]  dst_mac,
  output logic [MAC_W-1:0]  src_mac,
  output logic [15:0]       len_type,
  output logic              vlan,
  output logic [2:0]        tc
);

  typedef enum logic [1:0] {IDLE, READ_WORD_1, READ_WORD_2, WAIT_LAST} state_t;
  state_t state;

  logic fire;
  assign fire  = in_valid & in_ready;
  assign ready = (state != IDLE);

  logic [15:0] tpid_w, tci_w;
  assign tpid_w = {in_data[39:32], in_data[47:40]};
  assign tci_w  = {in_data[55:48], in_data[63:56]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      complete <= 1'b0;
      runt     <= 1'b0;
      dst_mac  <= '0;
      src_mac  <= '0;
      len_type <= '0;
      vlan     <= 1'b0;
      tc       <= '0;
    end else begin
      complete <= 1'b0;
      unique case (state)
        IDLE: if (in_valid) state <= READ_WORD_1;
        READ_WORD_1:
          if (fire) begin
            dst_mac        <= in_data[47:0];
            src_mac[15:0]  <= in_data[63:48];
            if (in_last) begin
              complete <= 1'b1;
              runt     <= 1'b1;
              state    <= IDLE;
            end else begin
              state <= READ_WORD_2;
            end
          end
        READ_WORD_2:
          if (fire) begin
            src_mac[47:16] <= in_data[31:0];
            len_type       <= tpid_w;
            vlan           <= (tpid_w == TPID_VLAN);
            tc             <= (tpid_w == TPID_VLAN) ? PCP_TO_TC[tci_w[15:13]] : 3'd0;
            complete       <= 1'b1;
            runt           <= 1'b0;
            state          <= in_last ? IDLE : WAIT_LAST;
          end
        WAIT_LAST: if (fire && in_last) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
