// tb_mrrns_encoder: random 10-bit samples (and the extremes -512, -1, 0, 511)
// into the GF(257) and GF(17) encoders.  After lat_encoder() cycles, output
// j must be the diminished-one code of d0 + d1*r + (d2 - 8*sign)*r^2 mod p,
// with r the j-th point of {0, 1, -1, 2, -2}.
module tb_mrrns_encoder;
  import mrrns_pkg::*;
  localparam int LEN = 300;
  localparam int LAT = int'(lat_encoder());
  logic clk = 1'b0, rst;
  logic signed [9:0] x_in;
  logic [8:0] y8 [5];
  logic [4:0] y4 [5];
  int xs [LEN + LAT];
  int checks = 0, failures = 0;
  int roots [5] = '{0, 1, -1, 2, -2};

  mrrns_encoder           dut8 (.clk, .rst, .x_in, .y_d1(y8));
  mrrns_encoder #(.NB(4)) dut4 (.clk, .rst, .x_in, .y_d1(y4));

  always #5 clk = ~clk;

  initial begin
    repeat (LEN + LAT + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_v(input int x, input int j, input int p);
    int u, d0, d1, d2, r, v;
    u = x & 1023;
    d0 = u & 7; d1 = (u >> 3) & 7; d2 = ((u >> 6) & 7) - 8 * ((u >> 9) & 1);
    r = roots[j];
    v = (d0 + d1 * r + d2 * r * r) % p;
    if (v < 0) v += p;
    return v;
  endfunction

  function automatic int dec(input int d1, input int nb);
    return (d1 == (1 << nb)) ? 0 : d1 + 1;
  endfunction

  initial begin
    for (int n = 0; n < LEN + LAT; n++) begin
      case (n)
        0: xs[n] = -512;
        1: xs[n] = -1;
        2: xs[n] = 0;
        3: xs[n] = 511;
        default: xs[n] = int'($urandom_range(0, 1023)) - 512;
      endcase
    end
    rst = 1; x_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < LEN + LAT; t++) begin
      x_in = 10'(xs[t]);
      @(posedge clk); #1;
      if (t + 1 - LAT >= 0) begin
        for (int j = 0; j < 5; j++) begin
          checks += 2;
          if (dec(int'(y8[j]), 8) != expect_v(xs[t + 1 - LAT], j, 257)) begin
            failures++;
            if (failures < 5) $display("x=%0d j=%0d got %0d exp %0d", xs[t+1-LAT], j, dec(int'(y8[j]), 8), expect_v(xs[t + 1 - LAT], j, 257));
          end
          if (dec(int'(y4[j]), 4) != expect_v(xs[t + 1 - LAT], j, 17)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
