// Receiver_tb: oversampling receiver against an unsynchronised serial source.
//
// ClkR runs at 100 MHz.  A free-running source drives RxD with frames (start
// bit, 8 data bits MSB first, stop bit) whose bit time is four ClkR periods
// stretched or shrunk by up to 2 percent per frame, starting at random
// sub-cycle phases, with idle gaps from one to several bit times.  A model of
// the display side acknowledges each Rcvd after a random delay and drops
// AckR once Rcvd falls.  For every frame the bench checks the byte on DOut,
// that Rcvd rises between 9 and 10 bit times after the start bit's falling
// edge (inside the stop bit), and that no frame is lost or duplicated.
module Receiver_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic ClkR = 0, ResetR, RxD, AckR, Rcvd;
  logic [7:0] DOut;
  int checks = 0, failures = 0;

  localparam int FRAMES = 300;
  localparam realtime TCLK = 10.0ns;

  Receiver dut (.*);

  always #(TCLK / 2) ClkR = ~ClkR;

  initial begin
    #(FRAMES * 2000ns);
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

  logic [7:0] sent_q[$];
  realtime    start_q[$];
  realtime    bit_q[$];
  int         received = 0;
  bit         source_done = 0;

  // Serial source.
  initial begin
    logic [7:0] b;
    realtime tbit;
    RxD = 1;
    ResetR = 1;
    repeat (3) @(posedge ClkR);
    #1ns ResetR = 0;
    #(TCLK * 3.37);
    for (int n = 0; n < FRAMES; n++) begin
      b = 8'($urandom);
      if (n == 0) b = 8'h00;
      if (n == 1) b = 8'hFF;
      tbit = 4 * TCLK * (1.0 + (real'(int'($urandom % 41) - 20) / 1000.0));
      sent_q.push_back(b);
      start_q.push_back($realtime);
      bit_q.push_back(tbit);
      RxD = 0;
      #(tbit);
      for (int k = 7; k >= 0; k--) begin
        RxD = b[k];
        #(tbit);
      end
      RxD = 1;
      #(tbit * (1.0 + real'($urandom % 300) / 100.0));
    end
    #(TCLK * 100);
    source_done = 1;
  end

  // Display side: four-cycle handshake on Rcvd/AckR.
  initial begin
    AckR = 0;
    forever begin
      @(posedge ClkR);
      if (!ResetR && Rcvd && !AckR) begin
        repeat ($urandom % 3) @(posedge ClkR);
        #1ns AckR = 1;
        @(posedge ClkR iff !Rcvd);
        #1ns AckR = 0;
      end
    end
  end

  // Scoreboard: check each new Rcvd.
  initial begin
    realtime lat, tbit;
    logic [7:0] exp;
    @(negedge ResetR);
    forever begin
      @(posedge Rcvd or posedge source_done);
      if (source_done) break;
      received++;
      if (sent_q.size() == 0) begin
        failures++; checks++;
        $display("%0t Rcvd with no frame sent", $time);
        continue;
      end
      exp  = sent_q.pop_front();
      lat  = $realtime - start_q.pop_front();
      tbit = bit_q.pop_front();
      check("DOut", int'(DOut), int'(exp));
      checks++;
      if (lat < 9.0 * tbit || lat > 10.0 * tbit) begin
        failures++;
        $display("%0t Rcvd latency %0.2f bit times", $time, lat / tbit);
      end
    end
    check("frames received", received, FRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
