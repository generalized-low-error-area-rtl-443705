// tb_fw_afa -- exhaustive self-checking testbench of fw_afa.
// Applies all 16 input combinations; AFA cell: {c_out,s_out} must equal x*y+s_in+c_in, computed here with integer
// arithmetic. Combinational: outputs are sampled 1 ns after each change.
module tb_fw_afa;
  int checks = 0;
  int failures = 0;
  logic x;
  logic y;
  logic s_in;
  logic c_in;
  logic s_out;
  logic c_out;

  fw_afa dut (.x(x), .y(y), .s_in(s_in), .c_in(c_in), .s_out(s_out), .c_out(c_out));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++)  // a few passes in varying order
    for (int k = 0; k < 16; k++) begin
      logic [3:0] v;
      int exp;
      v = 4'(k ^ (r * 5));
      x = v[0];
      y = v[1];
      s_in = v[2];
      c_in = v[3];
      #1;
      exp = int'(x)*int'(y)+int'(s_in)+int'(c_in);
      checks++;
      if (int'({c_out,s_out}) != exp) begin
        failures++;
        $display("FAIL inputs=%b got=%0d exp=%0d", v, {c_out,s_out}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
