// SerialLink: keypad-to-LCD link over a single asynchronous serial wire.
//
// Two subsystems with unrelated clocks.  The transmitting side (ClkS, one
// bit time per cycle) decodes a 4x3 keypad into ASCII in KeyboardDecode and
// hands the byte to the Sender with a four-cycle Send/AckS handshake; the
// Sender puts it on the wire as a start bit, 8 data bits MSB first and a stop
// bit.  The receiving side (ClkR, nominally four times ClkS) finds each start
// bit by oversampling in the Receiver, collects the byte, and hands it to
// DisplayControl with a four-cycle Rcvd/AckR handshake; DisplayControl
// initialises the LCD after reset and then writes each character to it.
//
// The wire is TxD inside the top and is also brought out so the line can be
// watched.  The keypad's row and column lines and the LCD's RS, DB and E
// lines are the top's ports.  ResetS and ResetR are synchronous to their own
// clocks.  The partitioning and all signal names follow the lecture design;
// the handshake assertions are this design's own.
module SerialLink
  import serial_pkg::*;
(
  // Transmitting side
  input  logic  ClkS,
  input  logic  ResetS,
  input  logic  R1, R2, R3, R4,
  input  logic  C1, C2, C3,
  output logic  TxD,
  // Receiving side
  input  logic  ClkR,
  input  logic  ResetR,
  output char_t DB,
  output logic  RS,
  output logic  E
);

  logic  Send, AckS;
  char_t CharToSend;
  logic  Rcvd, AckR;
  char_t CharRcvd;

  KeyboardDecode u_decode (
    .ClkS  (ClkS),
    .ResetS(ResetS),
    .R1(R1), .R2(R2), .R3(R3), .R4(R4),
    .C1(C1), .C2(C2), .C3(C3),
    .AckS  (AckS),
    .Send  (Send),
    .DOut  (CharToSend)
  );

  Sender u_sender (
    .ClkS  (ClkS),
    .ResetS(ResetS),
    .Send  (Send),
    .DIn   (CharToSend),
    .AckS  (AckS),
    .TxD   (TxD)
  );

  Receiver u_receiver (
    .ClkR  (ClkR),
    .ResetR(ResetR),
    .RxD   (TxD),
    .AckR  (AckR),
    .DOut  (CharRcvd),
    .Rcvd  (Rcvd)
  );

  DisplayControl u_display (
    .ClkR    (ClkR),
    .ResetR  (ResetR),
    .Rcvd    (Rcvd),
    .CharRcvd(CharRcvd),
    .AckR    (AckR),
    .DB      (DB),
    .RS      (RS),
    .Enable  (E)
  );

  // Four-cycle handshake rules: a request is withdrawn only after it has been
  // acknowledged, and an acknowledge is withdrawn only once the request is low.
  a_send_held: assert property (@(posedge ClkS) disable iff (ResetS)
    $fell(Send) |-> $past(AckS));
  a_acks_after_send: assert property (@(posedge ClkS) disable iff (ResetS)
    $fell(AckS) |-> !$past(Send));
  a_rcvd_held: assert property (@(posedge ClkR) disable iff (ResetR)
    $fell(Rcvd) |-> $past(AckR));
  a_ackr_after_rcvd: assert property (@(posedge ClkR) disable iff (ResetR)
    $fell(AckR) |-> !$past(Rcvd));

endmodule
