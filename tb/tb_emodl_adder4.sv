// tb_emodl_adder4: exhaustive test of the 4-bit EMODL tree: every a, b and
// carry-in; sum, carry-out and complement carry-out checked against a + b + cin.
module tb_emodl_adder4;
  logic [3:0] a, b, s;
  logic c0, ct0, cout, ctout;
  int checks = 0, failures = 0;

  emodl_adder4 dut (.a, .b, .c0, .ct0, .s, .cout, .ctout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int sum;
      {c0, a, b} = 9'(v);
      ct0 = ~c0;
      #1;
      sum = int'(a) + int'(b) + int'(c0);
      checks++;
      if ({cout, s} != 5'(sum) || ctout != ~cout) begin
        failures++;
        if (failures < 5) $display("a=%0d b=%0d c=%0d -> %0d", a, b, c0, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
