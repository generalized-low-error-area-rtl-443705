// fw_afa -- AFA array cell: AND partial product plus full adder.
// Forms the partial-product bit x_i*y_j and adds it to the sum arriving
// diagonally from the row above (s_in, same column) and the carry arriving
// vertically from the row above (c_in, one column lower). s_out leaves
// diagonally, c_out vertically, as in a carry-save array multiplier.
// Combinational.
module fw_afa (
  input  logic x,
  input  logic y,
  input  logic s_in,
  input  logic c_in,
  output logic s_out,
  output logic c_out
);
  logic pp;
  assign pp = x & y;
  fw_fa u_fa (.a(pp), .b(s_in), .ci(c_in), .s(s_out), .co(c_out));
endmodule
