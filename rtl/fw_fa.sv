// fw_fa -- one-bit full adder.
// The carry-propagate row at the bottom of the fixed-width multiplier array
// is a chain of these cells, and the AFA/NFA array cells wrap one behind a
// partial-product gate. Purely combinational: s = a ^ b ^ ci, co = majority.
module fw_fa (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
