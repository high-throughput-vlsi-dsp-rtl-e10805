// tb_fermat_rom: reads all 256 words of the GF(257) antilog ROM and all 16 of
// the GF(17) one; word k must be 3^k - 1, with the powers of 3 worked out here
// by repeated multiplication.
module tb_fermat_rom;
  logic [7:0] addr8, data8;
  logic [3:0] addr4, data4;
  int checks = 0, failures = 0;

  fermat_rom           dut8 (.addr(addr8), .data(data8));
  fermat_rom #(.NB(4)) dut4 (.addr(addr4), .data(data4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x8, x4;
    x8 = 1; x4 = 1;
    for (int k = 0; k < 256; k++) begin
      addr8 = 8'(k); addr4 = 4'(k);
      #1;
      checks++;
      if (int'(data8) != x8 - 1) failures++;
      if (k < 16) begin
        checks++;
        if (int'(data4) != x4 - 1) failures++;
      end
      x8 = (x8 * 3) % 257;
      x4 = (x4 * 3) % 17;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
