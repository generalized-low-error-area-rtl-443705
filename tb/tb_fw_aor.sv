// tb_fw_aor -- exhaustive self-checking testbench of fw_aor.
// Applies all 8 input combinations; AOR cell: pp_out must be x*y and or_out must be 1 when or_in or x*y is 1, computed here with integer
// arithmetic. Combinational: outputs are sampled 1 ns after each change.
module tb_fw_aor;
  int checks = 0;
  int failures = 0;
  logic x;
  logic y;
  logic or_in;
  logic pp_out;
  logic or_out;

  fw_aor dut (.x(x), .y(y), .or_in(or_in), .pp_out(pp_out), .or_out(or_out));

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
      x = v[0];
      y = v[1];
      or_in = v[2];
      #1;
      exp = int'(x)*int'(y) + 2*(((int'(or_in)+int'(x)*int'(y)) > 0) ? 1 : 0);
      checks++;
      if (int'({or_out,pp_out}) != exp) begin
        failures++;
        $display("FAIL inputs=%b got=%0d exp=%0d", v, {or_out,pp_out}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
