// DisplayControl: LCD initialisation sequencer and character writer.
//
// The LCD has no clock: it reads RS and DB7..DB0 on each falling edge of its
// E input, with setup and hold times far shorter than a ClkR period.  After
// reset this block is in init mode (RS = 0, commands).  A counter CS steps
// once per ClkR edge and E follows CS[0], giving four E pulses.  DB is loaded
// with the next command on the edges where CS is 0, 2, 4 and 6, i.e. as E
// rises, so each command is stable for a full cycle on both sides of the
// falling edge of E.  The commands are Clear Display, Function Set, Display
// On and Entry Mode Set.  On the edge where CS is 8 (one cycle after the
// last falling edge of E) init mode ends, RS turns to 1 and CS stops.
//
// Afterwards E follows AckR, the acknowledge half of a four-cycle handshake
// with the receiver: when Rcvd is seen high, DB takes the character and AckR
// (and so E) rises; the receiver drops Rcvd; on the next edge that sees Rcvd
// low, AckR and E fall and the LCD latches the character, still on DB.  A
// Rcvd raised during init waits until init has ended.
//
// ResetR is synchronous.  This follows the lecture design with one change:
// the lecture's listing leaves init mode at CS = 9, which would raise E once
// more with Entry Mode Set on DB and then drop it just as RS turns to 1;
// ending at CS = 8 avoids that stray write.  Clearing DB at reset is also
// this design's own choice.
module DisplayControl
  import serial_pkg::*;
(
  input  logic  ClkR,
  input  logic  ResetR,
  input  logic  Rcvd,
  input  char_t CharRcvd,
  output logic  AckR,
  output char_t DB,
  output logic  RS,
  output logic  Enable
);

  localparam logic [3:0] INIT_LAST = 4'd8;

  logic       initMode;   // initialisation sequence in progress
  logic [3:0] CS;         // init sequence step

  assign RS     = initMode ? LCD_COMMAND : LCD_CHARACTER;
  assign Enable = initMode ? CS[0] : AckR;

  always_ff @(posedge ClkR) begin
    if (ResetR)        CS <= '0;
    else if (initMode) CS <= CS + 1'b1;
  end

  always_ff @(posedge ClkR) begin
    if (ResetR)                      initMode <= 1'b1;
    else if (initMode && CS == INIT_LAST) initMode <= 1'b0;
  end

  always_ff @(posedge ClkR) begin
    if (ResetR) DB <= '0;
    else if (initMode) begin
      unique case (CS)
        4'd0:    DB <= LCD_CLEAR_DISPLAY;
        4'd2:    DB <= LCD_FUNCTION_SET;
        4'd4:    DB <= LCD_DISPLAY_ON;
        4'd6:    DB <= LCD_ENTRY_MODE_SET;
        default: ;
      endcase
    end
    else if (Rcvd) DB <= CharRcvd;
  end

  // AckR FSM: rises on Rcvd, falls once Rcvd has dropped; idle in init mode.
  always_ff @(posedge ClkR) begin
    if (ResetR)                            AckR <= 1'b0;
    else if (~initMode & Rcvd & ~AckR)     AckR <= 1'b1;
    else if (~initMode & ~Rcvd)            AckR <= 1'b0;
  end

endmodule
