// KeyboardDecode: 4x3 keypad decoder and request side of the sender handshake.
//
// The keypad closes one row line (R1..R4) and one column line (C1..C3) while a
// key is held.  A key counts as pressed when some row and some column are both
// active.  While a key is pressed and the sender is not acknowledging (AckS
// low), every rising ClkS edge loads DOut with the key's ASCII code and raises
// Send.  Send stays high until the sender raises AckS, and drops on the first
// edge that sees AckS high.  While AckS is high the keypad is ignored, so
// DOut is stable from the edge that raises Send until the sender has latched
// it.  A key still held when AckS falls is sent again.
//
// Keys, top row first: 1 2 3 / 4 5 6 / 7 8 9 / * 0 #.  If several keys are
// closed at once the lowest row wins, then the lowest column.
//
// Timing: Send rises one edge after a key is seen, the sender answers one
// edge later, and Send falls on the edge after that.  ResetS is synchronous
// and clears Send and DOut.  The decode table, the handshake and the
// priority follow the lecture design; clearing DOut at reset is this
// design's own choice.
module KeyboardDecode
  import serial_pkg::*;
(
  input  logic  ClkS,
  input  logic  ResetS,
  input  logic  R1, R2, R3, R4,
  input  logic  C1, C2, C3,
  input  logic  AckS,
  output logic  Send,
  output char_t DOut
);

  logic  KeyPressed;
  logic  Capture;
  char_t KeyCode;

  assign KeyPressed = (R1 | R2 | R3 | R4) & (C1 | C2 | C3);
  assign Capture    = KeyPressed & ~AckS;

  // Row/column to ASCII.  The first matching row, then column, is taken.
  always_comb begin
    KeyCode = DOut;
    if      (R1) KeyCode = C1 ? ASCII_1    : C2 ? ASCII_2 : ASCII_3;
    else if (R2) KeyCode = C1 ? ASCII_4    : C2 ? ASCII_5 : ASCII_6;
    else if (R3) KeyCode = C1 ? ASCII_7    : C2 ? ASCII_8 : ASCII_9;
    else if (R4) KeyCode = C1 ? ASCII_STAR : C2 ? ASCII_0 : ASCII_HASH;
  end

  always_ff @(posedge ClkS) begin
    if (ResetS)       DOut <= '0;
    else if (Capture) DOut <= KeyCode;
  end

  always_ff @(posedge ClkS) begin
    if (ResetS)       Send <= 1'b0;
    else if (Capture) Send <= 1'b1;
    else if (AckS)    Send <= 1'b0;
  end

endmodule
