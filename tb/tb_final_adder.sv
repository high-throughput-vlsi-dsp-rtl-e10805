// tb_final_adder: random mixed radix digit sets (and the edge values around
// the sign threshold 2184/2185).  Two cycles later y must equal
// sum_k 8^k * C_k with C_k = a257 + 257*a17 read as signed modulo 4369, and
// neg must flag the coefficients read as negative.
module tb_final_adder;
  localparam int LEN = 3000;
  localparam int LAT = 2;
  logic clk = 1'b0, rst;
  logic [4:0] a17 [5];
  logic [8:0] a257 [5];
  logic signed [25:0] y;
  logic [4:0] neg;
  int va [LEN + LAT][5], vb [LEN + LAT][5];
  int checks = 0, failures = 0;

  final_adder dut (.clk, .rst, .a17, .a257, .y, .neg);

  always #5 clk = ~clk;

  initial begin
    repeat (LEN + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < LEN + LAT; n++)
      for (int k = 0; k < 5; k++) begin
        int xv;
        case ($urandom_range(0, 5))
          0: xv = 2184;
          1: xv = 2185;
          2: xv = 4368;
          default: xv = int'($urandom_range(0, 4368));
        endcase
        va[n][k] = xv / 257;
        vb[n][k] = xv % 257;
      end
    rst = 1;
    for (int k = 0; k < 5; k++) begin a17[k] = '0; a257[k] = '0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < LEN + LAT; t++) begin
      for (int k = 0; k < 5; k++) begin a17[k] = 5'(va[t][k]); a257[k] = 9'(vb[t][k]); end
      @(posedge clk); #1;
      if (t + 1 - LAT >= 0) begin
        longint e;
        logic [4:0] en;
        int n;
        n = t + 1 - LAT;
        e = 0;
        for (int k = 4; k >= 0; k--) begin
          int c;
          c = vb[n][k] + 257 * va[n][k];
          en[k] = (c > 2184);
          if (c > 2184) c -= 4369;
          e = e * 8 + longint'(c);
        end
        checks += 2;
        if (longint'(y) != e) begin
          failures++;
          if (failures < 5) $display("n=%0d y=%0d exp %0d", n, y, e);
        end
        if (neg != en) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
