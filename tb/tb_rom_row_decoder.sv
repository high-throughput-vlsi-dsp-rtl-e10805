// tb_rom_row_decoder: for every value of A7..A2 (and of A3..A2 for the 16-word
// ROM), exactly the word line with that number must be high.
module tb_rom_row_decoder;
  logic [5:0]  ah8;
  logic [63:0] wl8;
  logic [1:0]  ah4;
  logic [3:0]  wl4;
  int checks = 0, failures = 0;

  rom_row_decoder           dut8 (.addr_hi(ah8), .wl(wl8));
  rom_row_decoder #(.NB(4)) dut4 (.addr_hi(ah4), .wl(wl4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      ah8 = 6'(v); ah4 = 2'(v);
      #1;
      checks += 2;
      if (wl8 != (64'd1 << v))      failures++;
      if (wl4 != (4'd1 << (v % 4))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
