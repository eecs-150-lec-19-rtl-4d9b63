// Counter: general-purpose synchronous up-counter.
//
// On each rising Clock edge the count is cleared by Reset, forced to all ones
// by Set, loaded from In by Load, or incremented (wrapping) by Enable, in that
// order of priority; otherwise it holds.  Count is the register output, so a
// change shows one cycle after the control input that caused it.  The
// receiver uses two of these, one counting samples within a bit and one
// counting bits within a frame.  The port list is the one the receiver
// instantiates; the priority order among the controls is this design's own.
module Counter #(
  parameter int unsigned width = 4
) (
  input  logic             Clock,
  input  logic             Reset,
  input  logic             Set,
  input  logic             Load,
  input  logic             Enable,
  input  logic [width-1:0] In,
  output logic [width-1:0] Count
);

  always_ff @(posedge Clock) begin
    if (Reset)       Count <= '0;
    else if (Set)    Count <= '1;
    else if (Load)   Count <= In;
    else if (Enable) Count <= Count + 1'b1;
  end

endmodule
