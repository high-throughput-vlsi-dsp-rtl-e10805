// tb_poly_map_array: a 4x5 GF(257) array and a 5x5 GF(17) array with random
// weights (zeros included) and a random input vector every cycle.  The
// results of the vector given at cycle t must appear together at cycle
// t + ROWS + COLS + 1 and equal the matrix-vector product mod p.
module tb_poly_map_array;
  import mrrns_pkg::*;
  localparam int LEN = 200;
  localparam int LA = int'(lat_array(4, 5));
  localparam int LB = int'(lat_array(5, 5));
  logic clk = 1'b0, rst;
  logic [8:0] ga [4];
  logic [8:0] wa [4][5];
  logic [8:0] sa [5];
  logic       ca [5];
  logic [4:0] gb [5];
  logic [4:0] wb [5][5];
  logic [4:0] sb [5];
  logic       cb [5];
  int wva [4][5], wvb [5][5];
  int xa [LEN + 20][4], xb [LEN + 20][5];
  int checks = 0, failures = 0;

  poly_map_array #(.NB(8), .ROWS(4), .COLS(5)) dut_a (.clk, .rst, .gamma(ga), .w(wa), .x_s(sa), .x_c(ca));
  poly_map_array #(.NB(4), .ROWS(5), .COLS(5)) dut_b (.clk, .rst, .gamma(gb), .w(wb), .x_s(sb), .x_c(cb));

  always #5 clk = ~clk;

  initial begin
    repeat (LEN + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(input int v, input int p, input int nb);
    int x = 1;
    if (v == 0) return 1 << nb;
    for (int k = 0; k < p - 1; k++) begin
      if (x == v) return k;
      x = (x * 3) % p;
    end
    return 0;
  endfunction

  function automatic int dec(input int s, input bit c, input int p);
    return (s + (c ? 0 : 1) + 1) % p;
  endfunction

  initial begin
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) begin
        wvb[i][j] = ((i + j) % 7 == 0) ? 0 : int'($urandom_range(0, 16));
        wb[i][j] = 5'(idx(wvb[i][j], 17, 4));
        if (i < 4) begin
          wva[i][j] = ((i + j) % 6 == 0) ? 0 : int'($urandom_range(0, 256));
          wa[i][j] = 9'(idx(wva[i][j], 257, 8));
        end
      end
    for (int n = 0; n < LEN + 20; n++) begin
      for (int i = 0; i < 4; i++) xa[n][i] = (n >= LEN) ? 0 : int'($urandom_range(0, 256));
      for (int i = 0; i < 5; i++) xb[n][i] = (n >= LEN) ? 0 : int'($urandom_range(0, 16));
    end
    rst = 1;
    for (int i = 0; i < 4; i++) ga[i] = 9'h100;
    for (int i = 0; i < 5; i++) gb[i] = 5'h10;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < LEN + 20; t++) begin
      for (int i = 0; i < 4; i++) ga[i] = 9'(idx(xa[t][i], 257, 8));
      for (int i = 0; i < 5; i++) gb[i] = 5'(idx(xb[t][i], 17, 4));
      @(posedge clk); #1;
      for (int j = 0; j < 5; j++) begin
        int n, e;
        n = t + 1 - LA;
        if (n >= 0) begin
          e = 0;
          for (int i = 0; i < 4; i++) e = (e + wva[i][j] * xa[n][i]) % 257;
          checks++;
          if (dec(int'(sa[j]), ca[j], 257) != e) begin
            failures++;
            if (failures < 5) $display("A n=%0d j=%0d got %0d exp %0d", n, j, dec(int'(sa[j]), ca[j], 257), e);
          end
        end
        n = t + 1 - LB;
        if (n >= 0) begin
          e = 0;
          for (int i = 0; i < 5; i++) e = (e + wvb[i][j] * xb[n][i]) % 17;
          checks++;
          if (dec(int'(sb[j]), cb[j], 17) != e) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
