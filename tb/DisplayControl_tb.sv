// DisplayControl_tb: LCD initialisation and character writes.
//
// A model of the LCD records RS and DB on every falling edge of Enable.  A
// model of the receiver raises Rcvd with a character, holds it until AckR,
// then drops it.  The bench checks that the first four LCD writes are Clear
// Display, Function Set, Display On and Entry Mode Set with RS = 0, that the
// first is latched on the second ClkR edge after reset and the others every
// two edges after it, that each character then arrives once with RS = 1, and
// that a Rcvd raised during initialisation is held off until it is over.
// Finally it checks that no other write reached the LCD.
module DisplayControl_tb;
  logic ClkR = 0, ResetR, Rcvd, AckR, RS, Enable;
  logic [7:0] CharRcvd, DB;
  int checks = 0, failures = 0;
  int cycle = 0;

  localparam int CHARS = 100;

  DisplayControl dut (.*);

  always #5 ClkR = ~ClkR;
  always @(posedge ClkR) cycle <= ResetR ? 0 : cycle + 1;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // LCD model: latches on the falling edge of Enable.
  logic [7:0] lcd_data[$];
  logic       lcd_rs[$];
  int         lcd_cycle[$];
  always @(negedge Enable) if (!ResetR) begin
    lcd_data.push_back(DB);
    lcd_rs.push_back(RS);
    lcd_cycle.push_back(cycle);
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] sent[$];
    logic [7:0] c;
    ResetR = 1; Rcvd = 0; CharRcvd = '0;
    repeat (3) @(negedge ClkR);
    ResetR = 0;
    // Raise a character at once, while the LCD is still being initialised.
    @(negedge ClkR);
    c = 8'h41; CharRcvd = c; Rcvd = 1; sent.push_back(c);
    repeat (4) begin
      @(negedge ClkR);
      check("AckR held off during init", int'(AckR), 0);
    end
    for (int n = 0; n <= CHARS; n++) begin
      if (n > 0) begin
        repeat ($urandom % 4) @(negedge ClkR);
        c = 8'($urandom); CharRcvd = c; Rcvd = 1; sent.push_back(c);
      end
      @(negedge ClkR iff AckR);
      Rcvd = 0;
      CharRcvd = 8'($urandom);
      @(negedge ClkR iff !AckR);
    end
    repeat (5) @(negedge ClkR);
    // Initialisation sequence.
    check("LCD writes", lcd_data.size(), 4 + sent.size());
    if (lcd_data.size() >= 4) begin
      check("init 1 Clear Display",  int'(lcd_data[0]), 8'b0000_0001);
      check("init 2 Function Set",   int'(lcd_data[1]), 8'b0011_0011);
      check("init 3 Display On",     int'(lcd_data[2]), 8'b0000_1100);
      check("init 4 Entry Mode Set", int'(lcd_data[3]), 8'b0000_0110);
      for (int i = 0; i < 4; i++) begin
        check("init RS", int'(lcd_rs[i]), 0);
        check("init timing", lcd_cycle[i], 2 + 2 * i);
      end
    end
    for (int i = 0; i < sent.size() && 4 + i < lcd_data.size(); i++) begin
      check("character", int'(lcd_data[4 + i]), int'(sent[i]));
      check("character RS", int'(lcd_rs[4 + i]), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
