// pcie_tx_if: PCIe Transmit Interface of the receive path.  Turns one
// received Ethernet frame into one posted memory-write TLP for the PCIe
// endpoint core's descriptor/data transmit interface.
//
// How it works.  A TLP header carries the payload length, so nothing can be
// sent before the whole frame has been seen (the Ethernet length/type field
// is no help: it holds a type, not a length, for values of 1536 and above).
// The frame therefore flows from the MAC Rx FIFO into the PCIe Tx FIFO while
// this block counts its data phases and keeps the keep bits of the last one
// (COUNT_LENGTH).  Meanwhile the output address lookup returns the routing
// address and traffic class for the frame's destination MAC address.  When
// both are known the block either discards the frame (no table match, or the
// MAC reported a bad frame, or the frame did not fit in the PCIe Tx FIFO) by
// clearing the PCIe Tx FIFO, or it sends the descriptor (SEND_DESC, waiting
// in WAIT_ACK for tx_ack if needed) and then the payload read from the PCIe
// Tx FIFO (SEND_DATA, LAST_DATA).  WAIT_FIFO, WAIT_STATE_1 and WAIT_STATE_2
// hold off while the FIFO has no data or the core asserts tx_ws.  Because the
// whole frame is stored before the descriptor goes out, WAIT_FIFO can only be
// reached if the FIFO is emptied under the block's feet; it is kept as the
// document's guard state.
//
// Descriptor: a memory-write header with 64-bit addressing (4 DW) when the
// routing address has non-zero upper 32 bits, otherwise 32-bit (3 DW); TC
// from the lookup, length in DW rounded up from the octet count, first/last
// DW byte enables from that count, requester ID from req_id.  DW0 sits in
// tx_desc[127:96].
//
// Endpoint-core handshake: tx_req and tx_dfr rise together with the
// descriptor; tx_req stays high until the cycle of tx_ack.  Data phases start
// in the cycle after tx_ack.  A phase on tx_data (marked by tx_dv, with its
// byte enables on tx_be) is taken by the core in every cycle in which tx_ws
// is low; tx_dfr falls for the last phase.  tx_err from the core cancels the
// TLP and flushes the rest of it from the PCIe Tx FIFO.
//
// MAC Rx FIFO side: `ready` is this block's part of the ready returned to the
// MAC Rx FIFO (low in IDLE, so the first phase waits one cycle, and low after
// the last phase until the frame has been sent or discarded).  in_valid,
// in_ready and in_beat let the block see which phases were taken.
//
// From the document: the ten states and their numbering, the length count,
// the descriptor contents, the discard-by-FIFO-reset and the core handshake.
// This design's choices: the exact wait-state semantics of tx_ws, the
// oversize-frame guard, treating tx_err as an input from the core (the
// document's signal table lists it as an input of the core while its text
// has the core report errors on it; the text is followed), 3-DW headers for
// 32-bit addresses, and the tx_dv/tx_be status outputs used by the loopback.
module pcie_tx_if
  import eth_pcie_pkg::*;
#(
  parameter int BEAT_W = 9    // data-phase counter width (frames up to 2**BEAT_W - 1 phases)
) (
  input  logic              clk,
  input  logic              rst_n,
  // MAC Rx FIFO read side (observed)
  input  logic              in_valid,
  input  logic              in_ready,
  input  axis_beat_t        in_beat,
  output logic              ready,
  // output address lookup result
  input  logic              res_valid,
  input  logic              res_match,
  input  logic [63:0]       res_route_addr,
  input  logic [2:0]        res_tc,
  input  logic [15:0]       req_id,
  // PCIe Tx FIFO
  input  logic              f_full,
  output logic              f_wr_en,
  input  logic              f_valid,
  input  axis_beat_t        f_beat,
  output logic              f_pop,
  output logic              f_clear,
  // endpoint core transmit interface
  output logic              tx_req,
  output logic [127:0]      tx_desc,
  input  logic              tx_ack,
  output logic              tx_dfr,
  output logic [DATA_W-1:0] tx_data,
  output logic              tx_dv,
  output logic [KEEP_W-1:0] tx_be,
  input  logic              tx_ws,
  input  logic              tx_err,
  // status
  output tx_if_state_t      state,
  output logic              frame_sent,      // pulse: last phase taken by the core
  output logic              frame_dropped    // pulse: frame discarded
);

  tx_if_state_t next;

  logic [BEAT_W-1:0] beats;      // data phases counted in this frame
  logic [BEAT_W-1:0] remaining;  // phases still to hand to the core
  logic [KEEP_W-1:0] last_keep;
  logic              eof, bad, oversize;
  logic              res_seen, match_q;
  logic [63:0]       addr_q;
  logic [2:0]        tc_q;

  logic in_fire;
  assign in_fire = in_valid & in_ready;

  // Frame size and header fields.
  logic [BEAT_W+2:0] nbytes;
  logic [BEAT_W:0]   len_dw;
  logic [1:0]        tail;
  logic [3:0]        first_be, last_be;

  function automatic logic [3:0] be_mask(input logic [1:0] n);  // n octets, 0 means 4
    case (n)
      2'd1: return 4'b0001;
      2'd2: return 4'b0011;
      2'd3: return 4'b0111;
      default: return 4'b1111;
    endcase
  endfunction

  always_comb begin
    nbytes   = {beats - 1'b1, 3'b000} + (BEAT_W+3)'(keep_bytes(last_keep));
    len_dw   = (BEAT_W+1)'((nbytes + (BEAT_W+3)'(3)) >> 2);
    tail     = nbytes[1:0];
    if (len_dw == 1) begin
      first_be = be_mask(tail);
      last_be  = 4'b0000;
    end else begin
      first_be = 4'b1111;
      last_be  = be_mask(tail);
    end
  end

  assign tx_desc = mwr_desc(addr_q, tc_q, len_dw[9:0], req_id, last_be, first_be);

  // Outputs per state.
  assign ready   = (state == TX_COUNT_LENGTH) && !eof;
  assign f_wr_en = in_fire && (state == TX_COUNT_LENGTH) && !oversize && !f_full;
  assign tx_req  = (state == TX_SEND_DESC) || (state == TX_WAIT_ACK);
  assign tx_dfr  = (state == TX_SEND_DESC) || (state == TX_WAIT_ACK) ||
                   (state == TX_SEND_DATA) || (state == TX_WAIT_STATE_2);
  assign tx_dv   = (state == TX_SEND_DATA) || (state == TX_LAST_DATA);
  assign tx_data = f_beat.data;
  assign tx_be   = (state == TX_LAST_DATA) ? last_keep : {KEEP_W{1'b1}};
  assign f_pop   = tx_dv && !tx_ws && !tx_err;
  assign f_clear = (state == TX_DISCARD);
  assign frame_sent    = (state == TX_LAST_DATA) && !tx_ws && !tx_err;
  assign frame_dropped = (state == TX_DISCARD);

  logic decide;
  assign decide = eof && res_seen;

  always_comb begin
    next = state;
    unique case (state)
      TX_IDLE: if (in_valid) next = TX_COUNT_LENGTH;
      TX_COUNT_LENGTH:
        if (decide) begin
          if (bad || oversize || !match_q) next = TX_DISCARD;
          else if (!f_valid)               next = TX_WAIT_FIFO;
          else if (tx_ws)                  next = TX_WAIT_STATE_1;
          else                             next = TX_SEND_DESC;
        end
      TX_SEND_DESC:
        if (tx_ack) begin
          if (tx_ws)                   next = TX_WAIT_STATE_2;
          else if (remaining == 1)     next = TX_LAST_DATA;
          else                         next = TX_SEND_DATA;
        end else                       next = TX_WAIT_ACK;
      TX_WAIT_ACK:
        if (tx_ack) next = (remaining == 1) ? TX_LAST_DATA : TX_SEND_DATA;
      TX_SEND_DATA:
        if (tx_err)                    next = TX_DISCARD;
        else if (tx_ws)                next = TX_WAIT_STATE_2;
        else if (remaining == 2)       next = TX_LAST_DATA;
      TX_WAIT_STATE_2:
        if (tx_err)                    next = TX_DISCARD;
        else if (!tx_ws)               next = (remaining == 1) ? TX_LAST_DATA : TX_SEND_DATA;
      TX_LAST_DATA:
        if (tx_err)                    next = TX_DISCARD;
        else if (!tx_ws)               next = TX_IDLE;
      TX_WAIT_FIFO:
        if (f_valid) next = tx_ws ? TX_WAIT_STATE_1 : TX_SEND_DESC;
      TX_WAIT_STATE_1:
        if (!tx_ws) next = f_valid ? TX_SEND_DESC : TX_WAIT_FIFO;
      TX_DISCARD: next = TX_IDLE;
      default: next = TX_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= TX_IDLE;
      beats     <= '0;
      remaining <= '0;
      last_keep <= '0;
      eof       <= 1'b0;
      bad       <= 1'b0;
      oversize  <= 1'b0;
      res_seen  <= 1'b0;
      match_q   <= 1'b0;
      addr_q    <= '0;
      tc_q      <= '0;
    end else begin
      state <= next;
      if (state == TX_IDLE) begin
        beats    <= '0;
        eof      <= 1'b0;
        bad      <= 1'b0;
        oversize <= 1'b0;
        res_seen <= 1'b0;
      end
      if (state == TX_COUNT_LENGTH) begin
        if (in_fire) begin
          if (f_full || beats == '1) oversize <= 1'b1;
          else                       beats    <= beats + 1'b1;
          if (in_beat.last) begin
            eof       <= 1'b1;
            bad       <= ~in_beat.user;
            last_keep <= in_beat.keep;
          end
        end
        if (res_valid) begin
          res_seen <= 1'b1;
          match_q  <= res_match;
          addr_q   <= res_route_addr;
          tc_q     <= res_tc;
        end
        if (decide) remaining <= beats;
      end
      if (f_pop) remaining <= remaining - 1'b1;
    end
  end

endmodule
