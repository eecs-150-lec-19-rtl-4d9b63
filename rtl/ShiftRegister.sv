// ShiftRegister: general-purpose shift register, serial in at the LSB.
//
// On each rising Clock edge the register is cleared by Reset, loaded from Pin
// by Load, or shifted one place toward the MSB with SIn entering at bit 0 by
// Enable, in that order of priority; otherwise it holds.  POut is the whole
// register and SOut its MSB, so a byte loaded in parallel leaves MSB first
// and a byte shifted in MSB first ends up in its natural bit order.  The
// receiver uses it serial-in/parallel-out, the sender parallel-in/serial-out.
// The port names follow the receiver's instance; the priority order is this
// design's own.
module ShiftRegister #(
  parameter int unsigned width = 8
) (
  input  logic [width-1:0] Pin,
  input  logic             SIn,
  output logic [width-1:0] POut,
  output logic             SOut,
  input  logic             Load,
  input  logic             Enable,
  input  logic             Clock,
  input  logic             Reset
);

  always_ff @(posedge Clock) begin
    if (Reset)       POut <= '0;
    else if (Load)   POut <= Pin;
    else if (Enable) POut <= {POut[width-2:0], SIn};
  end

  assign SOut = POut[width-1];

endmodule
