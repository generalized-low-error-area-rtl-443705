// tb_fw_mult_type2 -- self-checking testbench of the Type 2 (w = 0)
// fixed-width multiplier. Every operand pair is applied for N = 8 with all
// four allowed indices Q, and for N = 6 with the default Q; random pairs for
// N = 16. Outputs are compared with the high product bits plus the bias of
// fw_ref_pkg::sigma_type2. Combinational: sampled 1 ns after each change.
module tb_fw_mult_type2;
  import fw_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  localparam logic [7:0] QS [4] = '{8'd0, 8'd1, 8'd128, 8'd129};

  logic [7:0]  x8, y8;
  logic [7:0]  p8 [4];
  logic [5:0]  x6, y6, p6;
  logic [15:0] x16, y16, p16;

  for (genvar q = 0; q < 4; q++) begin : g_q
    fw_mult_type2 #(.N(8), .Q(QS[q])) dut (.x(x8), .y(y8), .p(p8[q]));
  end
  fw_mult_type2 #(.N(6))  dut6  (.x(x6),  .y(y6),  .p(p6));
  fw_mult_type2 #(.N(16)) dut16 (.x(x16), .y(y16), .p(p16));

  task automatic check(string tag, longint unsigned got, longint unsigned exp,
                       longint unsigned a, longint unsigned b);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s x=%0h y=%0h got=%0h exp=%0h", tag, a, b, got, exp);
    end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x6 = '0; y6 = '0; x16 = '0; y16 = '0;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a); y8 = 8'(b);
        #1;
        for (int q = 0; q < 4; q++)
          check($sformatf("n8q%0d", QS[q]), p8[q],
                fixed_width(a, b, 8, sigma_type2(a, b, 8, QS[q])), a, b);
      end
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        x6 = 6'(a); y6 = 6'(b);
        #1;
        check("n6", p6, fixed_width(a, b, 6, sigma_type2(a, b, 6, 33)), a, b);
      end
    for (int k = 0; k < 20000; k++) begin
      longint unsigned a = $urandom & 16'hffff, b = $urandom & 16'hffff;
      if (k < 4) begin a = (k & 1) ? 64'h8000 : 64'h7fff; b = (k & 2) ? 64'h8000 : 64'h7fff; end
      // force the all-ones threshold column now and then: x = -1, y = 1
      if (k == 4) begin a = 64'hffff; b = 64'h0001; end
      x16 = 16'(a); y16 = 16'(b);
      #1;
      check("n16", p16, fixed_width(a, b, 16, sigma_type2(a, b, 16, 32769)), a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
