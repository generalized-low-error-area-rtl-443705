// fw_mult_type2 -- low-error fixed-width two's-complement multiplier keeping
// N columns (w = 0), Type 2 binary thresholding with index theta_{Q,0}.
//
// Returns p = the N most significant bits of x*y (N-bit two's-complement
// operands) plus an error-compensation bias sigma:
//   sigma = x_{N-2}y_1 + x_{N-3}y_2 + ... + x_1y_{N-2} + [theta_Q < N]
// where theta_Q is the number of ones among the N bits of column N-1, the
// corner bits x_{N-1}y_0 and x_0y_{N-1} complemented when Q has bit N-1 and
// bit 0 set respectively. The default Q = 2^(N-1)+1 complements both
// corners, so theta_Q is exactly the Baugh-Wooley column N-1 and sigma adds
// one unless that whole column is ones. Q = 0, 1 and 2^(N-1) are the three
// other indices with nearly the same error; no other Q is allowed.
//
// Structure (this design's own; only the bias is specified): a Baugh-Wooley
// carry-save array over columns N..2N-1 (AFA, NFA and full-adder cells as in
// the Type 1 array). In column N-1 the middle partial products are passed
// up into column N as carries, and an AND chain over all N (possibly
// complemented) bits of the column yields the flag theta_Q = N; its
// complement enters column N at the x_0*y_{N-1} position. The constant one
// of column N is the carry input of the ripple row, the one of column 2N-1
// an inverter on the top carry. Purely combinational, no clock.
//
// Parameters: N operand/product width (>= 4), Q index.
module fw_mult_type2 #(
  parameter int unsigned N = 8,
  parameter logic [N-1:0] Q = N'((1 << (N - 1)) + 1)
) (
  input  logic [N-1:0] x,   // multiplicand, two's complement
  input  logic [N-1:0] y,   // multiplier, two's complement
  output logic [N-1:0] p    // product bits 2N-1 .. N, two's complement
);
  localparam int unsigned TH = N - 1;  // threshold column

  // Cell (i,j) = (x_i, y_j) in column i+j; outputs in g_row[j].g_col[i]:
  //   sd  sum, to cell (i-1,j+1);  cv  carry, to cell (i,j+1);
  //   andc AND chain of the threshold column, to cell (i-1,j+1).
  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic sd, cv, andc;
      if (i + j < TH) begin : g_drop
        assign sd   = 1'b0;
        assign cv   = 1'b0;
        assign andc = 1'b0;
      end else if (i + j == TH) begin : g_thr
        logic t;  // this cell's bit of theta_Q
        assign t  = (x[i] & y[j]) ^ Q[i];
        assign sd = 1'b0;
        if (j == 0) begin : g_first
          assign andc = t;
          assign cv   = 1'b0;
        end else if (i == 0) begin : g_last
          assign andc = 1'b0;
          assign cv   = ~(g_row[j-1].g_col[i+1].andc & t);  // [theta_Q < N]
        end else begin : g_mid
          assign andc = g_row[j-1].g_col[i+1].andc & t;
          assign cv   = x[i] & y[j];
        end
      end else if (i == N - 1) begin : g_sign
        if (j == N - 1) begin : g_a
          assign sd = x[i] & y[j];
        end else begin : g_nd
          assign sd = ~(x[i] & y[j]);
        end
        assign cv   = 1'b0;
        assign andc = 1'b0;
      end else begin : g_add
        // Every kept cell left of the threshold column with i < N-1 has
        // j >= 2, so both a sum and a carry arrive from the row above.
        assign andc = 1'b0;
        if (j == N - 1) begin : g_nfa
          fw_nfa u_nfa (.x(x[i]), .y(y[j]), .s_in(g_row[j-1].g_col[i+1].sd),
                        .c_in(g_row[j-1].g_col[i].cv), .s_out(sd), .c_out(cv));
        end else begin : g_afa
          fw_afa u_afa (.x(x[i]), .y(y[j]), .s_in(g_row[j-1].g_col[i+1].sd),
                        .c_in(g_row[j-1].g_col[i].cv), .s_out(sd), .c_out(cv));
        end
      end
    end
  end

  // Final carry-propagate row over columns N..2N-2, inverter for column 2N-1.
  logic [N-2:0] rcy;  // rcy[k]: carry into column N+k
  assign rcy[0] = 1'b1;  // Baugh-Wooley constant of column N
  for (genvar k = 0; k < N - 1; k++) begin : g_ripple
    logic co;
    fw_fa u_fa (.a(g_row[N-1].g_col[k+1].sd), .b(g_row[N-1].g_col[k].cv),
                .ci(rcy[k]), .s(p[k]), .co(co));
    if (k < N - 2) begin : g_next
      assign rcy[k+1] = co;
    end else begin : g_last
      assign p[N-1] = ~co;
    end
  end

  initial begin
    assert (N >= 4 && (Q == N'(0) || Q == N'(1) || Q == N'(1 << (N - 1))
                       || Q == N'((1 << (N - 1)) + 1)))
      else $error("fw_mult_type2: need N >= 4 and Q in {0, 1, 2^(N-1), 2^(N-1)+1}");
  end
endmodule
