// fw_nfa -- NFA array cell: NAND partial product plus full adder.
// Same as the AFA cell but the partial-product bit is complemented, as the
// Baugh-Wooley scheme requires for the bits x_{n-1}*y_j and x_i*y_{n-1}
// (exactly one operand bit is a sign bit). Used in the last array row.
// Combinational.
module fw_nfa (
  input  logic x,
  input  logic y,
  input  logic s_in,
  input  logic c_in,
  output logic s_out,
  output logic c_out
);
  logic pp_n;
  assign pp_n = ~(x & y);
  fw_fa u_fa (.a(pp_n), .b(s_in), .ci(c_in), .s(s_out), .co(c_out));
endmodule
