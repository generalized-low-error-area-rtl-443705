// fw_anor -- ANOR cell, the last cell of the threshold column (x_0 * y_{n-1-w}).
// It adds the Type 1 compensation: one extra unit in column n-w when
// theta = 0, i.e. when every bit of the threshold column is zero. Its one
// output, comp, enters the column above as a carry and has to carry both its
// own partial product x*y and the flag [theta = 0]. The two can never both be
// 1 (x*y = 1 makes theta > 0), so their sum fits in one bit:
//   comp = (x & y) | NOR(or_in, x & y)  =  (x & y) | ~or_in.
// or_in is the OR of all other bits of the column from the AOR chain.
// Combinational.
module fw_anor (
  input  logic x,
  input  logic y,
  input  logic or_in,
  output logic comp
);
  logic pp, zero;
  always_comb begin
    pp   = x & y;
    zero = ~(or_in | pp);
    comp = pp | zero;
  end
endmodule
