// KeyboardDecode_tb: key decoding and the request side of the Send/AckS handshake.
//
// For each of the twelve keys (in random order, several rounds) the bench
// closes its row and column, plays the sender: it waits for Send, checks that
// Send came exactly one edge after the key and that DOut is the key's ASCII
// code, raises AckS, checks that Send drops on the next edge, then presses a
// different key while AckS is high and checks that neither Send nor DOut
// reacts.  It also checks that a key held through the end of AckS is
// requested again, and that reset clears Send.
module KeyboardDecode_tb;
  logic ClkS = 0, ResetS;
  logic R1, R2, R3, R4, C1, C2, C3;
  logic AckS, Send;
  logic [7:0] DOut;
  int checks = 0, failures = 0;

  // Keys in row-major order: rows 1..4, columns 1..3.
  localparam string KEYS = "123456789*0#";

  KeyboardDecode dut (.*);

  always #10 ClkS = ~ClkS;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  task automatic press(int key);
    {R1, R2, R3, R4} = 4'b1000 >> (key / 3);
    {C1, C2, C3}     = 3'b100 >> (key % 3);
  endtask

  task automatic release_keys();
    {R1, R2, R3, R4, C1, C2, C3} = '0;
  endtask

  initial begin
    int key, other, wait_cycles;
    ResetS = 1; AckS = 0; release_keys();
    repeat (2) @(negedge ClkS);
    check("Send in reset", 8'(Send), 8'd0);
    ResetS = 0;
    @(negedge ClkS);
    check("Send idle", 8'(Send), 8'd0);
    for (int round = 0; round < 4; round++) begin
      for (int n = 0; n < 12; n++) begin
        key = (round == 0) ? n : int'($urandom % 12);
        press(key);
        @(negedge ClkS);
        check("Send one edge after key", 8'(Send), 8'd1);
        check("DOut code", DOut, 8'(KEYS[key]));
        // Sender acknowledges a few cycles later; Send must stay up meanwhile.
        wait_cycles = $urandom % 3;
        repeat (wait_cycles) begin
          @(negedge ClkS);
          check("Send held until AckS", 8'(Send), 8'd1);
        end
        AckS = 1;
        @(negedge ClkS);
        check("Send dropped after AckS", 8'(Send), 8'd0);
        // A second key while AckS is high is ignored.
        other = (key + 1 + int'($urandom % 11)) % 12;
        press(other);
        repeat (3) begin
          @(negedge ClkS);
          check("Send ignores key while AckS", 8'(Send), 8'd0);
          check("DOut held while AckS", DOut, 8'(KEYS[key]));
        end
        release_keys();
        @(negedge ClkS);
        AckS = 0;
        repeat (2) @(negedge ClkS);
        check("Send stays low with no key", 8'(Send), 8'd0);
      end
    end
    // A key held through the end of AckS is sent again.
    press(7);
    @(negedge ClkS); AckS = 1;
    repeat (3) @(negedge ClkS);
    AckS = 0;
    @(negedge ClkS);
    check("held key requested again", 8'(Send), 8'd1);
    check("held key code", DOut, 8'(KEYS[7]));
    // Synchronous reset clears a pending request.
    ResetS = 1;
    @(negedge ClkS);
    check("reset clears Send", 8'(Send), 8'd0);
    check("reset clears DOut", DOut, 8'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
