// pcie_rx_if: PCIe Receive Interface of the transmit path.  Turns a
// memory-write TLP delivered by the PCIe endpoint core's descriptor/data
// receive interface back into the Ethernet frame it carries and writes that
// frame into the MAC Tx FIFO.
//
// How it works.  When the core raises rx_req, the descriptor on rx_desc is
// checked: only memory writes with data (3- or 4-DW header) are supported.
// An unsupported TLP is throttled with rx_ws for one cycle (WAIT_ABORT) and
// then refused with a one-cycle rx_abort (ABORT).  A supported TLP is
// accepted with a one-cycle rx_ack (ACK); if the MAC Tx FIFO cannot take
// data yet the block first waits in WAIT_FIFO_1 with rx_ws high.  The payload
// phases that follow (rx_dv) are registered and written to the MAC Tx FIFO,
// one cycle behind rx_data, with rx_be as the keep bits (RX_DATA).  The phase
// during which rx_dfr is low is the last one; it goes out with `last`
// (LAST_DATA).  Whenever the MAC Tx FIFO stops accepting, the block holds the
// core off with rx_ws (WAIT_FIFO_2).  If the core raises rx_err in the middle
// of a payload the block stops, reports the error for as long as rx_err is
// high (ERROR) and closes the partly written frame with a zero-keep phase
// carrying last and user, which tells the MAC to abandon the frame.
//
// Handshake with the core: a payload phase is taken in each cycle in which
// rx_dv is high and rx_ws is low; rx_ws is a combinational function of the
// state and of the MAC Tx FIFO's ready.  The core is assumed to drop rx_req
// after rx_ack or rx_abort.
//
// MAC Tx FIFO side: m_valid/m_ready/m_beat, AXI4-Stream.
//
// From the document: the nine states with their numbers and transitions, the
// supported-type check, abort, wait states, the keep-from-byte-enable rule
// and the error state.  This design's choices: the output register, the
// exact cycle meaning of rx_ws, the frame-closing phase on error, and sending
// no rx_ack in WAIT_FIFO_1 (the document's table has the state send one; the
// transition to ACK sends it once instead).
module pcie_rx_if
  import eth_pcie_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // endpoint core receive interface
  input  logic              rx_req,
  input  logic [127:0]      rx_desc,
  output logic              rx_ack,
  input  logic              rx_dfr,
  input  logic              rx_dv,
  input  logic [DATA_W-1:0] rx_data,
  input  logic [KEEP_W-1:0] rx_be,
  output logic              rx_ws,
  input  logic              rx_err,
  output logic              rx_abort,
  // MAC Tx FIFO write side
  output logic              m_valid,
  input  logic              m_ready,
  output axis_beat_t        m_beat,
  // status
  output rx_if_state_t      state,
  output logic              err_report,
  output logic              frame_done     // pulse: last phase written
);

  rx_if_state_t next;

  logic space, desc_ok, take, frame_open, term_sent;
  assign space   = !m_valid || m_ready;
  assign desc_ok = (rx_desc[124:120] == TYPE_MEM) &&
                   ((rx_desc[127:125] == FMT_3DW_DATA) || (rx_desc[127:125] == FMT_4DW_DATA));

  always_comb begin
    unique case (state)
      RX_WAIT_FIFO_1, RX_WAIT_ABORT, RX_WAIT_FIFO_2: rx_ws = 1'b1;
      RX_ACK, RX_DATA:                               rx_ws = !space;
      default:                                       rx_ws = 1'b0;
    endcase
  end

  assign rx_ack     = (state == RX_ACK);
  assign rx_abort   = (state == RX_ABORT);
  assign err_report = (state == RX_ERROR);
  assign take       = rx_dv && !rx_ws && !rx_err &&
                      ((state == RX_ACK) || (state == RX_DATA));
  assign frame_done = take && !rx_dfr;

  always_comb begin
    next = state;
    unique case (state)
      RX_IDLE:
        if (rx_req) begin
          if (!desc_ok)   next = RX_WAIT_ABORT;
          else if (space) next = RX_ACK;
          else            next = RX_WAIT_FIFO_1;
        end
      RX_WAIT_FIFO_1: if (space) next = RX_ACK;
      RX_ACK, RX_DATA:
        if (rx_err && state == RX_DATA) next = RX_ERROR;
        else if (take && !rx_dfr)       next = RX_LAST_DATA;
        else if (!space)                next = RX_WAIT_FIFO_2;
        else                            next = RX_DATA;
      RX_WAIT_FIFO_2:
        if (rx_err)     next = RX_ERROR;
        else if (space) next = RX_DATA;
      RX_LAST_DATA:  next = RX_IDLE;
      RX_WAIT_ABORT: next = RX_ABORT;
      RX_ABORT:      next = RX_IDLE;
      RX_ERROR:      if (!rx_err && (term_sent || !frame_open)) next = RX_IDLE;
      default:       next = RX_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= RX_IDLE;
      m_valid    <= 1'b0;
      m_beat     <= '0;
      frame_open <= 1'b0;
      term_sent  <= 1'b0;
    end else begin
      state <= next;
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (take) begin
        m_valid     <= 1'b1;
        m_beat.data <= rx_data;
        m_beat.keep <= rx_be;
        m_beat.last <= !rx_dfr;
        m_beat.user <= 1'b0;
        frame_open  <= rx_dfr;
      end
      if (state == RX_ERROR && frame_open && !term_sent && space) begin
        m_valid     <= 1'b1;
        m_beat.data <= '0;
        m_beat.keep <= '0;
        m_beat.last <= 1'b1;
        m_beat.user <= 1'b1;
        term_sent   <= 1'b1;
      end
      if (state == RX_IDLE) begin
        frame_open <= 1'b0;
        term_sent  <= 1'b0;
      end
    end
  end

endmodule
