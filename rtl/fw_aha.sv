// fw_aha -- AHA array cell: AND partial product plus half adder.
// Used where an array cell has a diagonal sum input but no carry arriving
// from above (first adder row of the w = 2 Type 1 array). Combinational.
module fw_aha (
  input  logic x,
  input  logic y,
  input  logic s_in,
  output logic s_out,
  output logic c_out
);
  logic pp;
  assign pp = x & y;
  fw_ha u_ha (.a(pp), .b(s_in), .s(s_out), .co(c_out));
endmodule
