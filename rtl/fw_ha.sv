// fw_ha -- one-bit half adder.
// Used by the AHA array cell, by the rounding chain on the right edge of the
// w >= 2 Type 1 array and by its extra bottom row that adds the constant 1 at
// column n. Purely combinational: s = a ^ b, co = a & b.
module fw_ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
