// Register: general-purpose storage register with load enable.
//
// On each rising Clock edge Out is cleared by Reset, forced to all ones by
// Set, or loaded from In by Enable, in that order of priority; otherwise it
// holds.  The receiver uses it to keep the last complete byte stable while
// the shift register collects the next one.  The port names follow the
// receiver's instance; the priority order is this design's own.
module Register #(
  parameter int unsigned width = 8
) (
  input  logic             Clock,
  input  logic             Reset,
  input  logic             Set,
  input  logic             Enable,
  input  logic [width-1:0] In,
  output logic [width-1:0] Out
);

  always_ff @(posedge Clock) begin
    if (Reset)       Out <= '0;
    else if (Set)    Out <= '1;
    else if (Enable) Out <= In;
  end

endmodule
