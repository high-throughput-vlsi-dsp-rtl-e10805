// tb_mrrns_ring_path: 4-tap ring paths over GF(257) and GF(17) with random
// samples and coefficients.  After lat_ring_path(4) cycles, coefficient k
// must equal sum_j sum_{a+b=k} xdig(n-j)[a] * hdig(j)[b] mod p, the
// convolution of base-8 digit polynomials worked out here.
module tb_mrrns_ring_path;
  import mrrns_pkg::*;
  localparam int NT = 4;
  localparam int LEN = 200;
  localparam int LAT = int'(lat_ring_path(NT));
  logic clk = 1'b0, rst;
  logic signed [9:0] x_in;
  logic [8:0] b8 [5][NT];
  logic [4:0] b4 [5][NT];
  logic [8:0] c8 [5];
  logic [4:0] c4 [5];
  logic signed [9:0] h [NT];
  int xs [LEN + LAT];
  int checks = 0, failures = 0;

  mrrns_ring_path #(.NB(8), .N_TAPS(NT)) dut8 (.clk, .rst, .x_in, .beta(b8), .coef(c8));
  mrrns_ring_path #(.NB(4), .N_TAPS(NT)) dut4 (.clk, .rst, .x_in, .beta(b4), .coef(c4));

  always #5 clk = ~clk;

  initial begin
    repeat (LEN + LAT + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dig(input int v, input int a);
    int u = v & 1023;
    if (a == 0) return u & 7;
    if (a == 1) return (u >> 3) & 7;
    return ((u >> 6) & 7) - 8 * ((u >> 9) & 1);
  endfunction

  function automatic int expect_c(input int n, input int k, input int p);
    int acc = 0;
    for (int j = 0; j < NT; j++)
      if (n - j >= 0)
        for (int a = 0; a < 3; a++)
          if (k - a >= 0 && k - a < 3) acc += dig(xs[n-j], a) * dig(int'(h[j]), k - a);
    acc = acc % p;
    if (acc < 0) acc += p;
    return acc;
  endfunction

  initial begin
    for (int j = 0; j < NT; j++) begin
      h[j] = 10'($urandom);
      for (int i = 0; i < 5; i++) begin
        b8[i][j] = 9'(coef_index(h[j], i, 257, 8));
        b4[i][j] = 5'(coef_index(h[j], i, 17, 4));
      end
    end
    for (int n = 0; n < LEN + LAT; n++) xs[n] = (n >= LEN) ? 0 : int'($urandom_range(0, 1023)) - 512;
    rst = 1; x_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < LEN + LAT; t++) begin
      x_in = 10'(xs[t]);
      @(posedge clk); #1;
      if (t + 1 - LAT >= 0) begin
        for (int k = 0; k < 5; k++) begin
          checks += 2;
          if (int'(c8[k]) != expect_c(t + 1 - LAT, k, 257)) begin
            failures++;
            if (failures < 5) $display("n=%0d k=%0d got %0d exp %0d", t + 1 - LAT, k, c8[k], expect_c(t + 1 - LAT, k, 257));
          end
          if (int'(c4[k]) != expect_c(t + 1 - LAT, k, 17)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
