// SerialLink_tb: whole link, keypad to LCD, at the design's default parameters.
//
// The transmitting side runs at a 40 ns bit clock and the receiving side at
// about a quarter of that (10.1 ns, so the two clocks drift against each
// other), as required by the receiver's 4x oversampling.  The bench
// presses keys on a model of the 4x3 keypad, and an LCD model records what
// the display controller writes.  It checks that the LCD first receives the
// four initialisation commands and then, with RS = 1, the ASCII code of
// every key pressed, in order.  Along the way it counts each mechanism of
// the design and fails if one never happened: the Send/AckS handshake, frames
// on the wire (sampled and decoded independently from the line), start bits
// found by the receiver, the Rcvd/AckR handshake, a second key pressed while
// the sender was busy (which must be ignored), and a key held past the end of
// a frame (which must be sent again).
module SerialLink_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic ClkS = 0, ClkR = 0, ResetS, ResetR;
  logic R1, R2, R3, R4, C1, C2, C3;
  logic TxD, RS, E;
  logic [7:0] DB;
  int checks = 0, failures = 0;

  localparam string KEYS = "123456789*0#";
  localparam realtime TS = 40ns;
  localparam realtime TR = 10.1ns;
  localparam int PRESSES = 40;

  SerialLink dut (.*);
  LcdModel lcd (.RS(RS), .DB(DB), .E(E), .Active(!ResetR));

  always #(TS / 2) ClkS = ~ClkS;
  initial begin
    #3.3ns;
    forever #(TR / 2) ClkR = ~ClkR;
  end

  initial begin
    #(PRESSES * 3000ns + 20000ns);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  task automatic press(int key);
    {R1, R2, R3, R4} = 4'b1000 >> (key / 3);
    {C1, C2, C3}     = 3'b100 >> (key % 3);
  endtask

  task automatic release_keys();
    {R1, R2, R3, R4, C1, C2, C3} = '0;
  endtask

  // Mechanism counters.
  int send_hs = 0, rcvd_hs = 0, starts = 0, line_frames = 0;
  int busy_ignored = 0, repeats = 0;

  always @(posedge ClkS) if (!ResetS && dut.Send && dut.AckS) send_hs++;
  always @(posedge ClkR) if (!ResetR && dut.Rcvd && dut.AckR) rcvd_hs++;
  always @(posedge ClkR)
    if (!ResetR && !dut.u_receiver.Receiving && !TxD) starts++;

  // Independent line monitor: decodes frames from TxD at the sender's rate.
  logic [7:0] line_q[$];
  initial begin
    logic [7:0] b;
    @(negedge ResetS);
    forever begin
      @(negedge TxD);
      #(TS / 2);
      checks++;
      if (TxD !== 1'b0) begin failures++; $display("%0t bad start bit", $time); end
      for (int k = 7; k >= 0; k--) begin
        #(TS);
        b[k] = TxD;
      end
      #(TS);
      checks++;
      if (TxD !== 1'b1) begin failures++; $display("%0t bad stop bit", $time); end
      line_q.push_back(b);
      line_frames++;
    end
  end

  initial begin
    logic [7:0] expected[$];
    int key, other;
    release_keys();
    ResetS = 1; ResetR = 1;
    repeat (3) @(posedge ClkS);
    #1ns ResetS = 0; ResetR = 0;
    repeat (4) @(posedge ClkS);
    for (int n = 0; n < PRESSES; n++) begin
      key = (n < 12) ? n : int'($urandom % 12);
      @(negedge ClkS);
      press(key);
      expected.push_back(8'(KEYS[key]));
      if (n % 5 == 3) begin
        // Press a second key while the first is being sent: it is ignored.
        @(negedge ClkS iff dut.AckS);
        other = (key + 1) % 12;
        press(other);
        repeat (3) @(negedge ClkS);
        if (dut.AckS && dut.u_decode.DOut == 8'(KEYS[key])) busy_ignored++;
        release_keys();
      end else if (n % 7 == 5) begin
        // Hold the key past the end of the frame: it is sent a second time.
        @(negedge ClkS iff dut.AckS);
        @(negedge ClkS iff !dut.AckS);
        @(negedge ClkS);
        release_keys();
        expected.push_back(8'(KEYS[key]));
        repeats++;
      end else begin
        @(negedge ClkS);
        release_keys();
      end
      @(negedge ClkS iff !dut.AckS && !dut.Send);
      repeat ($urandom % 5) @(negedge ClkS);
    end
    // Let the last frames reach the display.
    #(40 * TS);

    check("LCD commands", lcd.commands, 4);
    if (lcd.data_q.size() >= 4) begin
      check("init Clear Display",  int'(lcd.data_q[0]), 8'b0000_0001);
      check("init Function Set",   int'(lcd.data_q[1]), 8'b0011_0011);
      check("init Display On",     int'(lcd.data_q[2]), 8'b0000_1100);
      check("init Entry Mode Set", int'(lcd.data_q[3]), 8'b0000_0110);
    end
    check("LCD characters", lcd.characters, expected.size());
    check("frames on the line", line_frames, expected.size());
    for (int i = 0; i < expected.size(); i++) begin
      if (4 + i < lcd.data_q.size()) begin
        check("character on LCD", int'(lcd.data_q[4 + i]), int'(expected[i]));
        check("character RS", int'(lcd.rs_q[4 + i]), 1);
      end
      if (i < line_q.size()) check("character on line", int'(line_q[i]), int'(expected[i]));
    end
    check("start bits found", starts, expected.size());

    $display("mechanisms: send_handshakes=%0d frames=%0d start_bits=%0d rcvd_handshakes=%0d busy_key_ignored=%0d held_key_repeats=%0d",
             send_hs, line_frames, starts, rcvd_hs, busy_ignored, repeats);
    checks++; if (send_hs == 0)      begin failures++; $display("no Send/AckS handshake"); end
    checks++; if (line_frames == 0)  begin failures++; $display("no frame on the line"); end
    checks++; if (starts == 0)       begin failures++; $display("no start bit found"); end
    checks++; if (rcvd_hs == 0)      begin failures++; $display("no Rcvd/AckR handshake"); end
    checks++; if (busy_ignored == 0) begin failures++; $display("busy key never ignored"); end
    checks++; if (repeats == 0)      begin failures++; $display("held key never repeated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
