// ShiftRegister_tb: checks the shift register in both uses the link makes of it.
//
// Part 1 loads random bytes in parallel and shifts them out, checking that
// SOut gives bits 7 down to 0.  Part 2 shifts random bytes in MSB first and
// checks POut.  Part 3 is random Reset/Load/Enable traffic against a model.
module ShiftRegister_tb;
  localparam int W = 8;
  logic Clock = 0, Reset, Load, Enable, SIn, SOut;
  logic [W-1:0] Pin, POut, model;
  int checks = 0, failures = 0;

  ShiftRegister dut (.*);

  always #5 Clock = ~Clock;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] b;
    Reset = 1; Load = 0; Enable = 0; SIn = 0; Pin = '0;
    @(negedge Clock); Reset = 0;
    // Parallel in, serial out, MSB first.
    for (int n = 0; n < 50; n++) begin
      b = W'($urandom);
      Pin = b; Load = 1; @(negedge Clock); Load = 0; Pin = W'($urandom);
      for (int k = W - 1; k >= 0; k--) begin
        check("SOut", W'(SOut), W'(b[k]));
        Enable = 1; @(negedge Clock); Enable = 0;
      end
    end
    // Serial in, parallel out.
    for (int n = 0; n < 50; n++) begin
      b = W'($urandom);
      for (int k = W - 1; k >= 0; k--) begin
        SIn = b[k]; Enable = 1; @(negedge Clock);
      end
      Enable = 0; SIn = ~SIn;
      @(negedge Clock);
      check("POut", POut, b);
    end
    // Random traffic against a model.
    Reset = 1; @(negedge Clock); model = '0;
    for (int i = 0; i < 2000; i++) begin
      Reset  = ($urandom % 50) == 0;
      Load   = ($urandom % 8) == 0;
      Enable = ($urandom % 2) == 0;
      SIn    = 1'($urandom);
      Pin    = W'($urandom);
      @(posedge Clock);
      if (Reset)       model = '0;
      else if (Load)   model = Pin;
      else if (Enable) model = {model[W-2:0], SIn};
      @(negedge Clock);
      check("random POut", POut, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
