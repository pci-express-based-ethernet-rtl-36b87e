// pdfc_frame_gen: builds PDFC frames from the pause requests of the class
// queue monitors and presents them as an AXI4-Stream frame for the MAC
// transmitter.
//
// How it works.  A request for class c (req_valid[c], req_time[c]) stores the
// class's timer and marks the class pending; a newer request for the same
// class replaces the timer.  When no frame is being sent and some class is
// pending, the pending set and timers are copied into the frame and the
// pending flags are cleared; requests arriving during a frame wait for the
// next one.  The frame is 60 octets (the MAC appends the FCS), 8 data
// phases of 8 octets, the last with keep = 0Fh:
//   octets 0-5   destination 01-80-C2-00-00-01
//   octets 6-11  STATION_MAC
//   octets 12-13 88-08 (MAC control)   octets 14-15 01-01 (PDFC opcode)
//   octet  16    reserved 0            octet  17    class-enable vector
//   octets 18+2c, 19+2c  timer of class c, most significant octet first
//   remaining octets 0
// Byte 0 of the data bus is the first octet on the wire, so a MAC address
// value has its first octet in bits [7:0].
//
// Interface: req_valid/req_time per class in; m_valid/m_ready/m_beat out;
// frame_sent pulses when the last phase is taken.
//
// From the document: the reserved multicast address, the MAC control
// frame carrying one timer per class and the class-enable vector, and the
// 0-65535 timer range.  This design's choices: the number of classes (the
// document's figure draws more timer fields than the eight PCP classes),
// the station address default and the merging of requests.
module pdfc_frame_gen
  import eth_pcie_pkg::*;
#(
  parameter int          NCLASS      = 8,
  parameter logic [47:0] STATION_MAC = 48'h010000350A02   // 02-0A-35-00-00-01
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NCLASS-1:0]      req_valid,
  input  logic [NCLASS-1:0][15:0] req_time,
  output logic                   m_valid,
  input  logic                   m_ready,
  output axis_beat_t             m_beat,
  output logic                   frame_sent
);

  localparam int NBEATS = 8;

  logic [NCLASS-1:0]       pend;
  logic [NCLASS-1:0][15:0] tim;
  logic [NCLASS-1:0]       f_en;
  logic [NCLASS-1:0][15:0] f_tim;
  logic [2:0]              beat;

  // frame image
  logic [NBEATS*8-1:0][7:0] oct;
  always_comb begin
    oct = '0;
    for (int i = 0; i < 6; i++) begin
      oct[i]     = PAUSE_DA[8*i +: 8];
      oct[6 + i] = STATION_MAC[8*i +: 8];
    end
    oct[12] = ETYPE_MAC_CTRL[15:8];
    oct[13] = ETYPE_MAC_CTRL[7:0];
    oct[14] = OPCODE_PDFC[15:8];
    oct[15] = OPCODE_PDFC[7:0];
    oct[17] = 8'(f_en);
    for (int c = 0; c < NCLASS; c++) begin
      oct[18 + 2*c] = f_tim[c][15:8];
      oct[19 + 2*c] = f_tim[c][7:0];
    end
  end

  assign m_beat.data = oct[8*beat +: 8];
  assign m_beat.keep = (beat == 3'(NBEATS - 1)) ? 8'h0F : 8'hFF;
  assign m_beat.last = (beat == 3'(NBEATS - 1));
  assign m_beat.user = 1'b0;
  assign frame_sent  = m_valid && m_ready && m_beat.last;

  logic start;
  assign start = !m_valid && (pend != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend    <= '0;
      tim     <= '0;
      f_en    <= '0;
      f_tim   <= '0;
      beat    <= '0;
      m_valid <= 1'b0;
    end else begin
      if (start) begin
        f_en    <= pend;
        f_tim   <= tim;
        beat    <= '0;
        m_valid <= 1'b1;
      end else if (m_valid && m_ready) begin
        beat <= beat + 1'b1;
        if (m_beat.last) m_valid <= 1'b0;
      end
      for (int c = 0; c < NCLASS; c++) begin
        if (req_valid[c]) begin
          pend[c] <= 1'b1;
          tim[c]  <= req_time[c];
        end else if (start) begin
          pend[c] <= 1'b0;
        end
      end
    end
  end

endmodule
