// Sender_tb: frame format and timing of the Sender.
//
// The bench plays the keypad decoder: it raises Send with a random byte and
// drops it on the first edge that sees AckS, as the four-cycle handshake
// requires.  Sampling TxD once per ClkS cycle, it checks that AckS rises one
// edge after Send, that TxD then gives the start bit (0) and bits 7 down to 0
// one per cycle, that AckS is high for exactly nine cycles, and that TxD is
// high (idle/stop) otherwise.  Requests come both back to back and after
// random gaps.
module Sender_tb;
  logic ClkS = 0, ResetS, Send, AckS, TxD;
  logic [7:0] DIn;
  int checks = 0, failures = 0;

  Sender dut (.*);

  always #10 ClkS = ~ClkS;

  initial begin
    #5000000;
    failures++;
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

  initial begin
    logic [7:0] b;
    int ack_cycles;
    ResetS = 1; Send = 0; DIn = '0;
    repeat (2) @(negedge ClkS);
    check("AckS in reset", int'(AckS), 0);
    check("TxD idle in reset", int'(TxD), 1);
    ResetS = 0;
    repeat (3) @(negedge ClkS);
    for (int n = 0; n < 200; n++) begin
      b = 8'($urandom);
      if (n < 4) b = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : (n == 2) ? 8'hA5 : 8'h31;
      Send = 1; DIn = b;
      check("TxD high before frame", int'(TxD), 1);
      @(negedge ClkS);
      // The edge that saw Send raised AckS; DIn may now change.
      check("AckS one edge after Send", int'(AckS), 1);
      DIn = 8'($urandom);
      check("start bit", int'(TxD), 0);
      ack_cycles = 1;
      @(negedge ClkS);
      Send = 0;
      for (int k = 7; k >= 0; k--) begin
        check("AckS during data", int'(AckS), 1);
        check($sformatf("data bit %0d", k), int'(TxD), int'(b[k]));
        ack_cycles++;
        @(negedge ClkS);
      end
      check("AckS length (bit times)", ack_cycles, 9);
      check("AckS low after frame", int'(AckS), 0);
      check("stop bit", int'(TxD), 1);
      repeat ($urandom % 4) begin
        @(negedge ClkS);
        check("idle high", int'(TxD), 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
