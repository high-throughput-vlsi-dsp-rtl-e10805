// tb_mrrns_inverse_map: picks random degree-4 polynomials over GF(257) and
// GF(17), evaluates them here at the five points {0, 1, -1, 2, -2}, feeds the
// values as diminished-one codes and checks that after lat_inverse() cycles
// the outputs are the polynomial's coefficients.
module tb_mrrns_inverse_map;
  import mrrns_pkg::*;
  localparam int LEN = 300;
  localparam int LAT = int'(lat_inverse());
  logic clk = 1'b0, rst;
  logic [8:0] g8 [5], c8 [5];
  logic [4:0] g4 [5], c4 [5];
  int p8 [LEN + LAT][5], p4 [LEN + LAT][5];
  int checks = 0, failures = 0;
  int roots [5] = '{0, 1, -1, 2, -2};

  mrrns_inverse_map           dut8 (.clk, .rst, .g_d1(g8), .coef(c8));
  mrrns_inverse_map #(.NB(4)) dut4 (.clk, .rst, .g_d1(g4), .coef(c4));

  always #5 clk = ~clk;

  initial begin
    repeat (LEN + LAT + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int eval_at(input int c [5], input int r, input int p);
    int v = 0, rp = 1;
    for (int k = 0; k < 5; k++) begin
      v = (v + c[k] * rp) % p;
      rp = rp * r;
    end
    v = v % p;
    if (v < 0) v += p;
    return v;
  endfunction

  function automatic int enc(input int v, input int nb);
    return (v == 0) ? (1 << nb) : v - 1;
  endfunction

  initial begin
    for (int n = 0; n < LEN + LAT; n++)
      for (int k = 0; k < 5; k++) begin
        p8[n][k] = ($urandom_range(0, 5) == 0) ? 0 : int'($urandom_range(0, 256));
        p4[n][k] = ($urandom_range(0, 5) == 0) ? 0 : int'($urandom_range(0, 16));
      end
    rst = 1;
    for (int i = 0; i < 5; i++) begin g8[i] = 9'h100; g4[i] = 5'h10; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < LEN + LAT; t++) begin
      for (int i = 0; i < 5; i++) begin
        g8[i] = 9'(enc(eval_at(p8[t], roots[i], 257), 8));
        g4[i] = 5'(enc(eval_at(p4[t], roots[i], 17), 4));
      end
      @(posedge clk); #1;
      if (t + 1 - LAT >= 0) begin
        for (int k = 0; k < 5; k++) begin
          checks += 2;
          if (int'(c8[k]) != p8[t + 1 - LAT][k]) begin
            failures++;
            if (failures < 5) $display("n=%0d k=%0d got %0d exp %0d", t + 1 - LAT, k, c8[k], p8[t + 1 - LAT][k]);
          end
          if (int'(c4[k]) != p4[t + 1 - LAT][k]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
