// fw_top -- the proposed low-error fixed-width multipliers side by side.
//
// Three independent combinational N x N -> N two's-complement multipliers,
// each with its own operand and product ports:
//   t1w1  Type 1, index theta_{Q=0,w=1}: N+1 columns kept. This is the main
//         design (the 8x8 version is the one laid out as a chip).
//   t1w2  Type 1, index theta_{Q=0,w=2}: N+2 columns kept, lower error,
//         larger area.
//   t2    Type 2, index theta_{Q=2^(N-1)+1,w=0}: N columns kept, the
//         smallest of the three.
// All three return the N most significant bits of x*y with an
// error-compensation bias for the dropped columns; see fw_mult_type1 and
// fw_mult_type2. No clock and no reset: each output settles one array delay
// after its inputs change. Grouping the three in one top is this design's
// choice; they share nothing.
module fw_top #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] t1w1_x,
  input  logic [N-1:0] t1w1_y,
  output logic [N-1:0] t1w1_p,
  input  logic [N-1:0] t1w2_x,
  input  logic [N-1:0] t1w2_y,
  output logic [N-1:0] t1w2_p,
  input  logic [N-1:0] t2_x,
  input  logic [N-1:0] t2_y,
  output logic [N-1:0] t2_p
);
  fw_mult_type1 #(.N(N), .W(1)) u_t1w1 (.x(t1w1_x), .y(t1w1_y), .p(t1w1_p));
  fw_mult_type1 #(.N(N), .W(2)) u_t1w2 (.x(t1w2_x), .y(t1w2_y), .p(t1w2_p));
  fw_mult_type2 #(.N(N))        u_t2   (.x(t2_x),   .y(t2_y),   .p(t2_p));
endmodule
