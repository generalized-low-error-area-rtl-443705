// fw_aor -- AOR cell of the threshold column (column n-1-w).
// The partial products of the first discarded column, theta = sum of
// x_i*y_j with i+j = n-1-w, are not dropped: each bit leaves on pp_out,
// vertically, and enters the column above as a carry (weight 2^(n-w)), and
// the cells chain an OR of the bits diagonally (or_in -> or_out) so that the
// last cell of the column knows whether theta is zero. The first cell of the
// chain gets or_in = 0. Combinational.
module fw_aor (
  input  logic x,
  input  logic y,
  input  logic or_in,
  output logic pp_out,
  output logic or_out
);
  always_comb begin
    pp_out = x & y;
    or_out = or_in | pp_out;
  end
endmodule
