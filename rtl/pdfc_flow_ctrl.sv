// pdfc_flow_ctrl: transmitter-side flow control of PDFC.  Watches the frames
// arriving from the MAC receiver, recognises PDFC frames, and suspends each
// class named in one for the time in its timer field.
//
// How it works.  The first five data phases of every frame are kept (octets
// 0-39).  On the last phase of a frame that the MAC marked good (tuser) the
// kept octets are checked: destination 01-80-C2-00-00-01, length/type 8808h,
// opcode 0101h.  For each class whose bit is set in the class-enable vector
// (octet 17) the class timer is loaded from octets 18+2c/19+2c; a zero timer
// releases the class at once.  Non-zero timers count down by one every pause
// quantum of 512 bit times (QUANTUM_CYCLES clock cycles); paused[c] is high
// while the timer of class c is not zero.  A frame shorter than five phases
// is ignored.
//
// Interface: s_valid/s_beat from the MAC receive AXI4-Stream (no
// back-pressure, as the MAC offers none); paused[NCLASS], timer values and a
// frame_seen pulse out.  A loaded timer takes effect the cycle after the last
// phase.
//
// From the document: the transmitter extracts the timer field and suspends
// the transmission of that class until the timer expires, the 512-bit-time
// unit, the reserved address.  This design's choices: field positions past
// the opcode follow IEEE 802.1Qbb priority flow control, eight classes, and
// a new frame overriding a running timer.
module pdfc_flow_ctrl
  import eth_pcie_pkg::*;
#(
  parameter int NCLASS         = 8,
  parameter int QUANTUM_CYCLES = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    s_valid,
  input  axis_beat_t              s_beat,
  output logic [NCLASS-1:0]       paused,
  output logic [NCLASS-1:0][15:0] timer,
  output logic                    frame_seen   // pulse: PDFC frame accepted
);

  logic [4:0][63:0] hdr;
  logic [2:0]       idx;     // data phase within the frame, saturates at 5

  logic [$clog2(QUANTUM_CYCLES)-1:0] q_cnt;
  logic q_tick;
  assign q_tick = (q_cnt == ($bits(q_cnt))'(QUANTUM_CYCLES - 1));

  // header octets, including the phase arriving now
  logic [39:0][7:0] oct;
  logic             is_pdfc;
  always_comb begin
    for (int b = 0; b < 5; b++)
      for (int i = 0; i < 8; i++)
        oct[8*b + i] = (idx == 3'(b)) ? s_beat.data[8*i +: 8] : hdr[b][8*i +: 8];
    is_pdfc = s_valid && s_beat.last && s_beat.user && (idx >= 3'd4) &&
              ({oct[5], oct[4], oct[3], oct[2], oct[1], oct[0]} == PAUSE_DA) &&
              ({oct[12], oct[13]} == ETYPE_MAC_CTRL) &&
              ({oct[14], oct[15]} == OPCODE_PDFC);
  end

  assign frame_seen = is_pdfc;

  always_comb
    for (int c = 0; c < NCLASS; c++) paused[c] = (timer[c] != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr   <= '0;
      idx   <= '0;
      q_cnt <= '0;
      timer <= '0;
    end else begin
      q_cnt <= q_tick ? '0 : q_cnt + 1'b1;
      if (s_valid) begin
        if (idx < 3'd5) hdr[idx] <= s_beat.data;
        if (s_beat.last)      idx <= '0;
        else if (idx < 3'd5)  idx <= idx + 1'b1;
      end
      for (int c = 0; c < NCLASS; c++) begin
        if (is_pdfc && oct[17][c])
          timer[c] <= {oct[18 + 2*c], oct[19 + 2*c]};
        else if (q_tick && timer[c] != '0)
          timer[c] <= timer[c] - 1'b1;
      end
    end
  end

endmodule
