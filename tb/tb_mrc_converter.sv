// tb_mrc_converter: all 17 x 257 residue pairs, one per cycle.  Four cycles
// later a257 + 257*a17 must be the number 0..4368 with those residues (found
// here by search), and a17 must be below 17.
module tb_mrc_converter;
  localparam int LAT = 4;
  localparam int NP = 17 * 257;
  logic clk = 1'b0, rst;
  logic [4:0] x17, a17;
  logic [8:0] x257, a257;
  int in17 [NP + LAT], in257 [NP + LAT];
  int checks = 0, failures = 0;

  mrc_converter dut (.clk, .rst, .x17, .x257, .a17, .a257);

  always #5 clk = ~clk;

  initial begin
    repeat (NP + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NP + LAT; n++) begin
      in17[n]  = (n / 257) % 17;
      in257[n] = n % 257;
    end
    rst = 1; x17 = '0; x257 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < NP + LAT; t++) begin
      x17 = 5'(in17[t]); x257 = 9'(in257[t]);
      @(posedge clk); #1;
      if (t + 1 - LAT >= 0) begin
        int n, xv;
        n = t + 1 - LAT;
        xv = in257[n];
        while (xv % 17 != in17[n]) xv += 257;
        checks++;
        if (a17 > 5'd16 || int'(a257) + 257 * int'(a17) != xv) begin
          failures++;
          if (failures < 5) $display("(%0d,%0d) -> a17=%0d a257=%0d, want %0d", in17[n], in257[n], a17, a257, xv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
