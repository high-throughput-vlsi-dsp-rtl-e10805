// tb_dim1_to_index: feeds every diminished-one code of GF(257) and GF(17)
// and checks the registered index one cycle later: NAN for the zero code,
// otherwise 3^index must equal code + 1.
module tb_dim1_to_index;
  logic clk = 1'b0, rst;
  logic [8:0] d8, i8;
  logic [4:0] d4, i4;
  int checks = 0, failures = 0;

  dim1_to_index           dut8 (.clk, .rst, .d1(d8), .idx(i8));
  dim1_to_index #(.NB(4)) dut4 (.clk, .rst, .d1(d4), .idx(i4));

  always #5 clk = ~clk;

  function automatic int pw(input int k, input int p);
    int x = 1;
    for (int t = 0; t < k; t++) x = (x * 3) % p;
    return x;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; d8 = '0; d4 = '0;
    @(posedge clk); #1 rst = 0;
    for (int v = 0; v <= 256; v++) begin
      d8 = 9'(v); d4 = 5'(v % 17);
      @(posedge clk); #1;
      checks += 2;
      if (v == 256) begin
        if (i8[8] != 1'b1) failures++;
      end else if (i8[8] || pw(int'(i8[7:0]), 257) != v + 1) failures++;
      if (v % 17 == 16) begin
        if (i4[4] != 1'b1) failures++;
      end else if (i4[4] || pw(int'(i4[3:0]), 17) != (v % 17) + 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
