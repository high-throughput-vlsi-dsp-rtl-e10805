// tb_emodl_bit: exhaustive test of one EMODL bit level.  For all eight
// operand/carry combinations (with the complement rail driven as the inverse
// of the carry) the sum and both carry rails must match a + b + c.
module tb_emodl_bit;
  logic a, b, c, ct, s, co, cto;
  int checks = 0, failures = 0;

  emodl_bit dut (.a, .b, .c, .ct, .s, .co, .cto);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int sum;
      {a, b, c} = 3'(v);
      ct = ~c;
      #1;
      sum = int'(a) + int'(b) + int'(c);
      checks += 3;
      if (s   != sum[0])  failures++;
      if (co  != sum[1])  failures++;
      if (cto != ~sum[1]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
