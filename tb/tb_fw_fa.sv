// tb_fw_fa -- exhaustive self-checking testbench of fw_fa.
// Applies all 8 input combinations; one-bit full adder: {co,s} must equal a+b+ci, computed here with integer
// arithmetic. Combinational: outputs are sampled 1 ns after each change.
module tb_fw_fa;
  int checks = 0;
  int failures = 0;
  logic a;
  logic b;
  logic ci;
  logic s;
  logic co;

  fw_fa dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++)  // a few passes in varying order
    for (int k = 0; k < 8; k++) begin
      logic [2:0] v;
      int exp;
      v = 3'(k ^ (r * 5));
      a = v[0];
      b = v[1];
      ci = v[2];
      #1;
      exp = int'(a)+int'(b)+int'(ci);
      checks++;
      if (int'({co,s}) != exp) begin
        failures++;
        $display("FAIL inputs=%b got=%0d exp=%0d", v, {co,s}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
