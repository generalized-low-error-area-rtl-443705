// tb_fw_mult_type1 -- self-checking testbench of the Type 1 fixed-width
// multiplier. Runs every operand pair for N = 8 with W = 1 (the main
// configuration) and W = 2, every pair for N = 6 with W = 1..4, and random
// pairs for N = 12, W = 3 and N = 16, W = 1. Each output is compared with
// the n high product bits plus the bias evaluated from its formula in
// fw_ref_pkg. The design is combinational: outputs are sampled 1 ns after
// the inputs change.
module tb_fw_mult_type1;
  import fw_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0]  x8, y8;
  logic [7:0]  p8w1, p8w2;
  logic [5:0]  x6, y6;
  logic [5:0]  p6 [1:4];
  logic [11:0] x12, y12, p12w3;
  logic [15:0] x16, y16, p16w1;

  fw_mult_type1 #(.N(8), .W(1))  dut8w1  (.x(x8),  .y(y8),  .p(p8w1));
  fw_mult_type1 #(.N(8), .W(2))  dut8w2  (.x(x8),  .y(y8),  .p(p8w2));
  for (genvar w = 1; w <= 4; w++) begin : g_n6
    fw_mult_type1 #(.N(6), .W(w)) dut (.x(x6), .y(y6), .p(p6[w]));
  end
  fw_mult_type1 #(.N(12), .W(3)) dut12w3 (.x(x12), .y(y12), .p(p12w3));
  fw_mult_type1 #(.N(16), .W(1)) dut16w1 (.x(x16), .y(y16), .p(p16w1));

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
    x6 = '0; y6 = '0; x12 = '0; y12 = '0; x16 = '0; y16 = '0;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a); y8 = 8'(b);
        #1;
        check("n8w1", p8w1, fixed_width(a, b, 8, sigma_type1(a, b, 8, 1)), a, b);
        check("n8w2", p8w2, fixed_width(a, b, 8, sigma_type1(a, b, 8, 2)), a, b);
      end
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        x6 = 6'(a); y6 = 6'(b);
        #1;
        for (int w = 1; w <= 4; w++)
          check($sformatf("n6w%0d", w), p6[w], fixed_width(a, b, 6, sigma_type1(a, b, 6, w)), a, b);
      end
    for (int k = 0; k < 20000; k++) begin
      longint unsigned a = $urandom, b = $urandom;
      // include the extreme operands
      if (k < 4) begin a = (k & 1) ? 64'h8000 : 64'h7fff; b = (k & 2) ? 64'h8000 : 64'h7fff; end
      x12 = 12'(a); y12 = 12'(b); x16 = 16'(a); y16 = 16'(b);
      #1;
      check("n12w3", p12w3, fixed_width(a & 64'hfff, b & 64'hfff, 12,
                                        sigma_type1(a & 64'hfff, b & 64'hfff, 12, 3)), a, b);
      check("n16w1", p16w1, fixed_width(a & 64'hffff, b & 64'hffff, 16,
                                        sigma_type1(a & 64'hffff, b & 64'hffff, 16, 1)), a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
