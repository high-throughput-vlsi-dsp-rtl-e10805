// tb_fir_subpath: a 6-tap GF(257) subpath and a 6-tap GF(17) subpath fed
// with random diminished-one samples (zeros included) and random coefficient
// indices.  From cycle lat_subpath(6) after the first sample, each output
// must equal sum_k h_k * a(n-k) mod p, computed here on normal-form values.
module tb_fir_subpath;
  import mrrns_pkg::*;
  localparam int NT = 6;
  localparam int LEN = 300;
  localparam int LAT = int'(lat_subpath(NT));
  logic clk = 1'b0, rst;
  logic [8:0] a8, y8, v8;
  logic [4:0] a4, y4, v4;
  logic [8:0] b8 [NT];
  logic [4:0] b4 [NT];
  int h8 [NT], h4 [NT];
  int x8 [LEN + LAT], x4 [LEN + LAT];
  int checks = 0, failures = 0;

  fir_subpath #(.NB(8), .N_TAPS(NT)) dut8 (.clk, .rst, .a_in(a8), .beta(b8), .y_d1(y8), .y_val(v8));
  fir_subpath #(.NB(4), .N_TAPS(NT)) dut4 (.clk, .rst, .a_in(a4), .beta(b4), .y_d1(y4), .y_val(v4));

  always #5 clk = ~clk;

  initial begin
    repeat (LEN + LAT + 100) @(posedge clk);
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

  function automatic int expect_y(input int n, input int p);
    int acc = 0;
    for (int k = 0; k < NT; k++)
      if (n - k >= 0) acc = (acc + ((p == 257) ? h8[k] * x8[n-k] : h4[k] * x4[n-k])) % p;
    return acc;
  endfunction

  initial begin
    for (int k = 0; k < NT; k++) begin
      h8[k] = (k == 2) ? 0 : int'($urandom_range(0, 256));
      h4[k] = (k == 3) ? 0 : int'($urandom_range(0, 16));
      b8[k] = 9'(idx(h8[k], 257, 8));
      b4[k] = 5'(idx(h4[k], 17, 4));
    end
    for (int n = 0; n < LEN + LAT; n++) begin
      x8[n] = (n >= LEN || $urandom_range(0, 7) == 0) ? 0 : int'($urandom_range(0, 256));
      x4[n] = (n >= LEN || $urandom_range(0, 7) == 0) ? 0 : int'($urandom_range(0, 16));
    end
    rst = 1; a8 = 9'h100; a4 = 5'h10;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < LEN + LAT; t++) begin
      a8 = (x8[t] == 0) ? 9'h100 : 9'(x8[t] - 1);
      a4 = (x4[t] == 0) ? 5'h10  : 5'(x4[t] - 1);
      @(posedge clk); #1;
      // after edge t+1 counted from the first sample: sample n = t + 1 - LAT
      if (t + 1 - LAT >= 0) begin
        checks += 2;
        if (int'(v8) != expect_y(t + 1 - LAT, 257)) begin
          failures++;
          if (failures < 5) $display("GF257 n=%0d got %0d exp %0d", t + 1 - LAT, v8, expect_y(t + 1 - LAT, 257));
        end
        if (int'(v4) != expect_y(t + 1 - LAT, 17)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
