// Register_tb: random-stimulus check of the Register against a reference model.
//
// Drives Reset, Set, Enable and In randomly on the falling clock edge and
// compares Out after every rising edge with a model using the same priority
// (Reset, Set, Enable; otherwise hold).
module Register_tb;
  localparam int W = 8;
  logic Clock = 0, Reset, Set, Enable;
  logic [W-1:0] In, Out, model;
  int checks = 0, failures = 0;

  Register dut (.*);

  always #5 Clock = ~Clock;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    Reset = 1; Set = 0; Enable = 0; In = '0; model = '0;
    @(negedge Clock);
    for (int i = 0; i < 2000; i++) begin
      Reset  = ($urandom % 40) == 0;
      Set    = ($urandom % 40) == 0;
      Enable = ($urandom % 3) == 0;
      In     = W'($urandom);
      @(posedge Clock);
      if (Reset)       model = '0;
      else if (Set)    model = '1;
      else if (Enable) model = In;
      @(negedge Clock);
      checks++;
      if (Out !== model) begin
        failures++;
        $display("step %0d: Out=%h expected %h", i, Out, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
