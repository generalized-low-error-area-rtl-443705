// tb_fw_anor -- exhaustive self-checking testbench of fw_anor.
// Applies all 8 input combinations; ANOR cell: comp must equal x*y + [or_in = 0 and x*y = 0], computed here with integer
// arithmetic. Combinational: outputs are sampled 1 ns after each change.
module tb_fw_anor;
  int checks = 0;
  int failures = 0;
  logic x;
  logic y;
  logic or_in;
  logic comp;

  fw_anor dut (.x(x), .y(y), .or_in(or_in), .comp(comp));

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
      exp = int'(x)*int'(y) + ((int'(or_in)==0 && int'(x)*int'(y)==0) ? 1 : 0);
      checks++;
      if (int'(comp) != exp) begin
        failures++;
        $display("FAIL inputs=%b got=%0d exp=%0d", v, comp, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
