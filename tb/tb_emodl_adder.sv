// tb_emodl_adder: the cascaded EMODL adder at its default 8 bits (exhaustive
// with both carry-ins) and at 9 and 26 bits (random), against a + b + cin.
module tb_emodl_adder;
  logic [7:0]  a8, b8, s8;
  logic [8:0]  a9, b9, s9;
  logic [25:0] a26, b26, s26;
  logic cin, co8, co9, co26;
  int checks = 0, failures = 0;

  emodl_adder               dut8  (.a(a8),  .b(b8),  .cin, .s(s8),  .cout(co8));
  emodl_adder #(.W(9))      dut9  (.a(a9),  .b(b9),  .cin, .s(s9),  .cout(co9));
  emodl_adder #(.W(26))     dut26 (.a(a26), .b(b26), .cin, .s(s26), .cout(co26));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 131072; v++) begin
      {cin, a8, b8} = 17'(v);
      a9 = 9'($urandom); b9 = 9'($urandom);
      a26 = 26'($urandom); b26 = 26'($urandom);
      #1;
      checks += 3;
      if ({co8, s8}   != 9'(int'(a8) + int'(b8) + int'(cin)))            failures++;
      if ({co9, s9}   != 10'(int'(a9) + int'(b9) + int'(cin)))           failures++;
      if ({co26, s26} != 27'(longint'(a26) + longint'(b26) + longint'(cin))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
