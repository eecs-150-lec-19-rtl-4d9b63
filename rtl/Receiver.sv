// Receiver: oversampling RS232-style receiver with a four-cycle output handshake.
//
// ClkR runs 2**CYCLE_WIDTH (by default 4) times as fast as the sender's bit
// clock and is unrelated to it in phase.  While idle (Receiving low), the
// first ClkR edge that samples RxD low marks the start bit: Receiving rises
// and both counters are cleared.  CycleCount then counts the samples within
// a bit and BitCount the bits within the frame (BitCount advances when
// CycleCount wraps).  Each bit is sampled once, on the edge where CycleCount
// is SAMPLE_CYCLE.  With the defaults that edge comes 2 to 3 sample periods
// after the bit's leading edge, between its middle and three quarters in.  The start bit and the eight
// data bits all pass through the SIPO shift register; after nine shifts it
// holds D7..D0 with the start bit pushed out.
//
// On the first edge with BitCount = 9 and CycleCount = 0 (frame slot 9, the
// stop bit) the byte is copied to DOut, Rcvd is raised and Receiving drops,
// so the receiver is ready for the next start bit from early in the stop
// bit.  Rcvd stays high until AckR is seen high; DOut holds until the next
// frame completes.  ResetR is synchronous.
//
// The counters, sampling point, stop condition and handshake follow the
// lecture design.  RxD is used without a synchroniser, as in the lecture;
// a production version would add one ahead of RxD.  The stop bit is not
// checked.  CYCLE_WIDTH and SAMPLE_CYCLE as parameters are this design's own.
module Receiver
  import serial_pkg::*;
#(
  parameter int unsigned CYCLE_WIDTH  = 2,
  parameter int unsigned SAMPLE_CYCLE = 1
) (
  input  logic  ClkR,
  input  logic  ResetR,
  input  logic  RxD,
  input  logic  AckR,
  output char_t DOut,
  output logic  Rcvd
);

  localparam logic [3:0] LAST_SLOT = 4'd9;

  logic                   Receiving;
  logic                   StartSeen;
  logic                   FrameDone;
  logic [CYCLE_WIDTH-1:0] CycleCount;
  logic [3:0]             BitCount;
  char_t                  Data;

  assign StartSeen = ~Receiving & ~RxD;
  assign FrameDone = (BitCount == LAST_SLOT) && (CycleCount == '0);

  // Receiving FSM: idle -> receiving on a low RxD, back on BitCount == 9.
  always_ff @(posedge ClkR) begin
    if (ResetR)                                 Receiving <= 1'b0;
    else if (StartSeen)                         Receiving <= 1'b1;
    else if (Receiving && BitCount == LAST_SLOT) Receiving <= 1'b0;
  end

  Counter #(.width(CYCLE_WIDTH)) Cycle (
    .Clock (ClkR),
    .Reset (ResetR | StartSeen),
    .Set   (1'b0),
    .Load  (1'b0),
    .Enable(Receiving),
    .In    ('0),
    .Count (CycleCount)
  );

  Counter #(.width(4)) Bit (
    .Clock (ClkR),
    .Reset (ResetR | StartSeen),
    .Set   (1'b0),
    .Load  (1'b0),
    .Enable(Receiving && CycleCount == '1),
    .In    ('0),
    .Count (BitCount)
  );

  ShiftRegister #(.width(DATA_BITS)) SIPO (
    .Pin   ('0),
    .SIn   (RxD),
    .POut  (Data),
    .SOut  (),
    .Load  (1'b0),
    .Enable(Receiving && CycleCount == CYCLE_WIDTH'(SAMPLE_CYCLE)),
    .Clock (ClkR),
    .Reset (ResetR)
  );

  Register #(.width(DATA_BITS)) DataRegister (
    .Clock (ClkR),
    .Reset (ResetR),
    .Set   (1'b0),
    .Enable(FrameDone),
    .In    (Data),
    .Out   (DOut)
  );

  // Rcvd FSM: raised when a byte is stored, lowered when acknowledged.
  always_ff @(posedge ClkR) begin
    if (ResetR)         Rcvd <= 1'b0;
    else if (FrameDone) Rcvd <= 1'b1;
    else if (AckR)      Rcvd <= 1'b0;
  end

endmodule
