// Sender: serialises one byte per handshake into an RS232-style frame on TxD.
//
// Idle, TxD is high and AckS low.  On the rising ClkS edge that sees Send
// high while AckS is low, the sender latches DIn into a shift register,
// raises AckS and clears its bit counter.  It then drives one bit per ClkS
// cycle: the low start bit while BitCount is 0, and data bits 7 down to 0
// while BitCount is 1 to 8 (the register shifts toward its MSB, which drives
// TxD).  On the edge that sees BitCount reach 8, AckS falls, which ends the
// frame; TxD returns high, and that high level is the stop bit.  The next
// Send can only be accepted after AckS has been low for at least one edge,
// so a stop bit of one or more bit times always separates frames.
//
// One ClkS period is one bit time.  AckS is the acknowledge half of a
// four-cycle handshake: it rises one edge after Send, stays high for the 9
// bit times of start and data bits, and falls without waiting for Send,
// which the requester has dropped long before.  ResetS is synchronous.
// All of this follows the lecture design; clearing the shift register at
// reset is this design's own choice.
module Sender
  import serial_pkg::*;
(
  input  logic  ClkS,
  input  logic  ResetS,
  input  logic  Send,
  input  char_t DIn,
  output logic  AckS,
  output logic  TxD
);

  logic [3:0] BitCount;
  logic       Start;
  logic       DataBit;

  // A new frame starts when a request arrives while not acknowledging.
  assign Start = Send & ~AckS;

  // Acknowledge FSM: ~AckS -> AckS on Send, AckS -> ~AckS on BitCount[3].
  always_ff @(posedge ClkS) begin
    if (ResetS)                 AckS <= 1'b0;
    else if (Start)             AckS <= 1'b1;
    else if (AckS & BitCount[3])  AckS <= 1'b0;
  end

  // Bit-time counter, cleared when the frame starts, free-running otherwise.
  always_ff @(posedge ClkS) begin
    if (ResetS | Start) BitCount <= '0;
    else                BitCount <= BitCount + 1'b1;
  end

  // Parallel-in, serial-out: load on Start, shift after the start bit.
  ShiftRegister #(.width(DATA_BITS)) PISO (
    .Pin   (DIn),
    .SIn   (1'b0),
    .POut  (),
    .SOut  (DataBit),
    .Load  (Start),
    .Enable(AckS && BitCount != 0),
    .Clock (ClkS),
    .Reset (ResetS)
  );

  // Line driver: start bit, data bit, or the idle/stop level.
  always_comb begin
    if (AckS && BitCount == 0) TxD = 1'b0;
    else if (AckS)             TxD = DataBit;
    else                       TxD = 1'b1;
  end

endmodule
