// serial_pkg: constants and types shared by the keypad-to-LCD serial link.
//
// The link carries one 8-bit character per frame: a low start bit, the eight
// data bits most significant bit first, and at least one high stop bit.  The
// characters are ASCII codes because the LCD at the far end displays ASCII.
// The four LCD commands below are the initialisation sequence that the
// display controller issues after every reset, in the order it issues them.
// The receiver samples the line four times per bit period.
package serial_pkg;

  typedef logic [7:0] char_t;

  // Frame layout: bit slot 0 is the start bit, slots 1..8 the data bits.
  localparam int unsigned DATA_BITS = 8;

  // ASCII codes of the twelve keypad keys.
  localparam char_t ASCII_0    = 8'h30;
  localparam char_t ASCII_1    = 8'h31;
  localparam char_t ASCII_2    = 8'h32;
  localparam char_t ASCII_3    = 8'h33;
  localparam char_t ASCII_4    = 8'h34;
  localparam char_t ASCII_5    = 8'h35;
  localparam char_t ASCII_6    = 8'h36;
  localparam char_t ASCII_7    = 8'h37;
  localparam char_t ASCII_8    = 8'h38;
  localparam char_t ASCII_9    = 8'h39;
  localparam char_t ASCII_STAR = 8'h2A;
  localparam char_t ASCII_HASH = 8'h23;

  // LCD register select: what the data bus carries on a falling edge of E.
  typedef enum logic {
    LCD_COMMAND   = 1'b0,
    LCD_CHARACTER = 1'b1
  } lcd_rs_e;

  // LCD initialisation commands (RS = 0), issued in this order.
  localparam char_t LCD_CLEAR_DISPLAY  = 8'b0000_0001;
  localparam char_t LCD_FUNCTION_SET   = 8'b0011_0011;
  localparam char_t LCD_DISPLAY_ON     = 8'b0000_1100;
  localparam char_t LCD_ENTRY_MODE_SET = 8'b0000_0110;

endpackage
