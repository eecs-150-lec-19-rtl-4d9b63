// LcdModel: behavioural model of the character LCD the link drives.
//
// The LCD has no clock.  On every falling edge of E it reads RS (0: command,
// 1: character) and the 8-bit data bus DB.  The model keeps every write in
// order so a testbench can compare them with what it expects, and counts
// writes of each kind.  It models no display memory and no busy time.
module LcdModel (
  input logic       RS,
  input logic [7:0] DB,
  input logic       E,
  input logic       Active
);
  logic [7:0] data_q[$];
  logic       rs_q[$];
  int         commands   = 0;
  int         characters = 0;

  always @(negedge E) if (Active) begin
    data_q.push_back(DB);
    rs_q.push_back(RS);
    if (RS) characters++;
    else    commands++;
  end
endmodule
