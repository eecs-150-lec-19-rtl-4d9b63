// Counter_tb: random-stimulus check of the Counter against a reference model.
//
// Drives Reset, Set, Load, Enable and In with random values on the falling
// clock edge and compares Count after every rising edge with a model that
// applies the same priority (Reset, Set, Load, Enable).  Uses a 4-bit
// counter so wrap-around happens often.
module Counter_tb;
  localparam int W = 4;
  logic Clock = 0, Reset, Set, Load, Enable;
  logic [W-1:0] In, Count, model;
  int checks = 0, failures = 0;

  Counter dut (.*);

  always #5 Clock = ~Clock;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wraps = 0;
    Reset = 1; Set = 0; Load = 0; Enable = 0; In = '0; model = '0;
    @(negedge Clock);
    for (int i = 0; i < 2000; i++) begin
      Reset  = ($urandom % 40) == 0;
      Set    = ($urandom % 30) == 0;
      Load   = ($urandom % 10) == 0;
      Enable = ($urandom % 4) != 0;
      In     = W'($urandom);
      @(posedge Clock);
      if (Reset)       model = '0;
      else if (Set)    model = '1;
      else if (Load)   model = In;
      else if (Enable) begin
        if (model == '1) wraps++;
        model = model + 1'b1;
      end
      @(negedge Clock);
      checks++;
      if (Count !== model) begin
        failures++;
        $display("step %0d: Count=%0d expected %0d", i, Count, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
