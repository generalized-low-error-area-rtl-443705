// fw_mult_type1 -- low-error fixed-width two's-complement multiplier, Type 1
// binary thresholding with index theta_{Q=0,w}.
//
// Multiplies two N-bit two's-complement numbers x and y and returns only the
// N most significant bits of the 2N-bit product, p = P[2N-1:N], with a
// data-dependent error-compensation bias added in place of the dropped
// columns. The partial products are the Baugh-Wooley ones: x_i*y_j, with the
// bit complemented when exactly one of i, j is N-1, plus constant ones in
// columns N and 2N-1.
//
// Of the 2N columns of partial products only the N+W most significant are
// built as a carry-save array (columns N-W .. 2N-1). The next column,
// column N-1-W, is the threshold column: its bits theta = sum x_i*y_j
// (i+j = N-1-W) are moved up one column as carries (AOR cells), and an OR
// chain through the column finds out whether theta is zero; the last cell
// (ANOR) then adds one extra unit in column N-W. Everything below column
// N-1-W is dropped. The carries leaving column N-1 give the bias
//   sigma = floor( (2^(W-1)*E_main + ... + col(N-W) + theta + [theta=0]
//                   + 2^(W-1) - 1) / 2^W )
// which is the Type 1 bias of the design with K1 rounded to 1 and K2 to 0;
// for W = 1 it reduces to sigma = floor((E_main + theta + [theta=0]) / 2).
// For W >= 2 the constant 2^(W-1)-1 is added by a half/full-adder chain on
// the right edge of the array (columns N-W .. N-1), whose carry uses the
// carry input of the final ripple row, so the Baugh-Wooley one of column N
// is added by an extra row of N half adders. For W = 1 that one enters as
// the carry input of the ripple row. The column-2N-1 one is the inverter on
// the top carry.
//
// Cell layout follows the published 8x8 arrays for W = 1 and W = 2; the
// general W rule for the right-edge constant is this design's reading of
// the general bias formula. Purely combinational: one ripple row (two for
// W >= 2) after an N-row carry-save array, no clock.
//
// Parameters: N operand/product width (>= 4), W extra kept columns,
// 1 <= W <= N-2.
module fw_mult_type1 #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 1
) (
  input  logic [N-1:0] x,   // multiplicand, two's complement
  input  logic [N-1:0] y,   // multiplier, two's complement
  output logic [N-1:0] p    // product bits 2N-1 .. N, two's complement
);
  localparam int unsigned KEEP = N - W;      // lowest column built
  localparam int unsigned TH   = N - 1 - W;  // threshold column

  // Array cell (i,j) = (x_i, y_j) sits in column i+j. Each cell has three
  // outputs, declared in its generate scope g_row[j].g_col[i]:
  //   sd  diagonal output: sum, stays in column i+j, goes to cell (i-1,j+1)
  //   cv  vertical output: carry into column i+j+1, goes to cell (i,j+1)
  //   orc OR chain of the threshold column, goes to cell (i-1,j+1)
  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic sd, cv, orc;
      if (i + j < TH) begin : g_drop
        assign sd  = 1'b0;
        assign cv  = 1'b0;
        assign orc = 1'b0;
      end else if (i + j == TH) begin : g_thr
        logic or_in;
        if (j == 0) begin : g_first
          assign or_in = 1'b0;
        end else begin : g_chain
          assign or_in = g_row[j-1].g_col[i+1].orc;
        end
        assign sd = 1'b0;
        if (i == 0) begin : g_anor
          fw_anor u_anor (.x(x[i]), .y(y[j]), .or_in(or_in), .comp(cv));
          assign orc = 1'b0;
        end else begin : g_aor
          fw_aor u_aor (.x(x[i]), .y(y[j]), .or_in(or_in),
                        .pp_out(cv), .or_out(orc));
        end
      end else if (i == N - 1) begin : g_sign
        // ND cells, and the A cell x_{N-1}*y_{N-1}: pass the bit on.
        if (j == N - 1) begin : g_a
          assign sd = x[i] & y[j];
        end else begin : g_nd
          assign sd = ~(x[i] & y[j]);
        end
        assign cv  = 1'b0;
        assign orc = 1'b0;
      end else if (j == 0) begin : g_top
        // Kept bit of the first row (A cell): passed on diagonally.
        assign sd  = x[i] & y[j];
        assign cv  = 1'b0;
        assign orc = 1'b0;
      end else begin : g_add
        assign orc = 1'b0;
        if (j == N - 1) begin : g_nfa
          fw_nfa u_nfa (.x(x[i]), .y(y[j]), .s_in(g_row[j-1].g_col[i+1].sd), .c_in(g_row[j-1].g_col[i].cv),
                        .s_out(sd), .c_out(cv));
        end else if (j == 1 && i >= KEEP) begin : g_aha
          // Cell above is a pass cell of the first row: no carry arrives.
          fw_aha u_aha (.x(x[i]), .y(y[j]), .s_in(g_row[j-1].g_col[i+1].sd),
                        .s_out(sd), .c_out(cv));
        end else begin : g_afa
          fw_afa u_afa (.x(x[i]), .y(y[j]), .s_in(g_row[j-1].g_col[i+1].sd), .c_in(g_row[j-1].g_col[i].cv),
                        .s_out(sd), .c_out(cv));
        end
      end
    end
  end

  // Right edge: the sum bits of columns KEEP..N-1 leave the array at the
  // cells (x_0, y_k). Only their carries into column N are kept, after the
  // rounding constant 2^(W-1)-1 (ones in columns KEEP..N-2) is added.
  logic cin_row;  // carry into the ripple row at column N
  if (W == 1) begin : g_w1
    assign cin_row = 1'b1;  // Baugh-Wooley constant of column N
  end else begin : g_wn
    logic rc [KEEP:N-1];
    for (genvar k = KEEP; k < N; k++) begin : g_edge
      logic s_unused;
      if (k == KEEP) begin : g_lo
        fw_ha u_ha (.a(g_row[k].g_col[0].sd), .b(1'b1), .s(s_unused), .co(rc[k]));
      end else if (k < N - 1) begin : g_mid
        fw_fa u_fa (.a(g_row[k].g_col[0].sd), .b(rc[k-1]), .ci(1'b1), .s(s_unused), .co(rc[k]));
      end else begin : g_hi
        fw_ha u_ha (.a(g_row[k].g_col[0].sd), .b(rc[k-1]), .s(s_unused), .co(rc[k]));
      end
    end
    assign cin_row = rc[N-1];
  end

  // Final carry-propagate row over columns N..2N-2, inverter for column 2N-1.
  logic [N-1:0] q;
  logic [N-2:0] rcy;  // rcy[k]: carry into column N+k
  assign rcy[0] = cin_row;
  for (genvar k = 0; k < N - 1; k++) begin : g_ripple
    logic co;
    fw_fa u_fa (.a(g_row[N-1].g_col[k+1].sd), .b(g_row[N-1].g_col[k].cv), .ci(rcy[k]), .s(q[k]), .co(co));
    if (k < N - 2) begin : g_next
      assign rcy[k+1] = co;
    end else begin : g_last
      assign q[N-1] = ~co;
    end
  end

  if (W == 1) begin : g_out1
    assign p = q;
  end else begin : g_outn
    // Extra half-adder row adding the Baugh-Wooley one of column N.
    logic [N:0] hc;
    assign hc[0] = 1'b1;
    for (genvar k = 0; k < N; k++) begin : g_inc
      fw_ha u_ha (.a(q[k]), .b(hc[k]), .s(p[k]), .co(hc[k+1]));
    end
  end

  initial begin
    assert (N >= 4 && W >= 1 && W <= N - 2)
      else $error("fw_mult_type1: need N >= 4 and 1 <= W <= N-2");
  end
endmodule
