// tb_mrrns_fir: end-to-end test of the MRRNS FIR filter (mrrns_fir) at 24 taps.
//
// Runs several streams of samples through the filter, each after a reset and
// with its own coefficient set, and compares every output with a model that
// works on plain integers: it splits samples and coefficients into their
// base-8 digit polynomials, convolves them, wraps each result coefficient
// into the signed range of the 17 x 257 residue system (-2184..2184) and sums
// with weights 8^k.  Where no coefficient wrapped, the output must also equal
// the direct convolution sum h_k * x(n-k).  The streams are: random data
// with small coefficients, random full-scale data and coefficients, a
// stream with zero samples and zero coefficients, and an all-maximum stream
// that forces coefficient overflow.  Also checked: the first out_valid comes
// exactly lat_fir(N_TAPS) cycles after the first in_valid.  Counted events:
// overflow, negative coefficients, zero samples (zero-code bypass), exact
// results; each must happen at least once.
module tb_mrrns_fir;
  import mrrns_pkg::*;

  localparam int unsigned NT   = 24;
  localparam int unsigned D    = 5;
  localparam int unsigned Y_W  = 26;
  localparam int unsigned LEN  = 120;    // samples per stream
  localparam int unsigned LAT  = lat_fir(NT);

  logic clk = 1'b0;
  logic rst;
  logic in_valid;
  logic signed [9:0] x_in;
  logic [8:0] beta257 [D][NT];
  logic [4:0] beta17  [D][NT];
  logic out_valid;
  logic signed [Y_W-1:0] y_out;
  logic [D-1:0] coef_neg;

  mrrns_fir #(.N_TAPS(NT)) dut (
    .clk, .rst, .in_valid, .x_in, .beta257, .beta17, .out_valid, .y_out, .coef_neg
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_overflow = 0, n_negative = 0, n_zero_sample = 0, n_exact = 0;

  logic signed [9:0] h [NT];
  logic signed [9:0] xs [LEN];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // base-8 digit polynomial: d0, d1, d2 - 8*sign
  function automatic void digits(input logic signed [9:0] v, output longint dg [3]);
    logic [9:0] u;
    u = v;
    dg[0] = longint'(u[2:0]);
    dg[1] = longint'(u[5:3]);
    dg[2] = longint'(u[8:6]) - 8 * longint'(u[9]);
  endfunction

  function automatic longint wrap(input longint c);
    longint r;
    r = c % 4369;
    if (r < 0) r += 4369;
    if (r > 2184) r -= 4369;
    return r;
  endfunction

  task automatic check_output(input int n);
    longint c [5];
    longint dx [3], dh [3];
    longint exp_y, direct;
    bit ovf;
    for (int k = 0; k < 5; k++) c[k] = 0;
    direct = 0;
    for (int j = 0; j < NT; j++) begin
      if (n - j >= 0) begin
        digits(xs[n-j], dx);
        digits(h[j], dh);
        direct += longint'(h[j]) * longint'(xs[n-j]);
        for (int a = 0; a < 3; a++)
          for (int b = 0; b < 3; b++)
            c[a+b] += dx[a] * dh[b];
      end
    end
    exp_y = 0;
    ovf = 0;
    for (int k = 4; k >= 0; k--) begin
      if (wrap(c[k]) != c[k]) ovf = 1;
      exp_y = exp_y * 8 + wrap(c[k]);
    end
    checks++;
    if (longint'(y_out) != exp_y) begin
      failures++;
      if (failures < 10) $display("mismatch n=%0d y=%0d expected %0d", n, y_out, exp_y);
    end
    if (ovf) n_overflow++;
    else begin
      checks++;
      n_exact++;
      if (longint'(y_out) != direct) begin
        failures++;
        if (failures < 10) $display("not exact n=%0d y=%0d direct %0d", n, y_out, direct);
      end
    end
    if (coef_neg != '0) n_negative++;
  endtask

  task automatic run_stream(input int mode);
    int cyc, first_out, nout;
    // coefficients
    for (int k = 0; k < NT; k++) begin
      case (mode)
        0: h[k] = 10'(signed'($urandom_range(0, 30)) - 15);
        1: h[k] = 10'($urandom);
        2: h[k] = (k % 3 == 1) ? 10'sd0 : 10'($urandom);
        default: h[k] = 10'sd511;
      endcase
    end
    for (int j = 0; j < D; j++)
      for (int k = 0; k < NT; k++) begin
        beta257[j][k] = 9'(coef_index(h[k], j, 257, 8));
        beta17[j][k]  = 5'(coef_index(h[k], j, 17, 4));
      end
    for (int n = 0; n < LEN; n++) begin
      case (mode)
        0, 1: xs[n] = 10'($urandom);
        2: xs[n] = ($urandom_range(0, 2) == 0) ? 10'sd0 : 10'($urandom);
        default: xs[n] = 10'sd511;
      endcase
      if (xs[n] == 0) n_zero_sample++;
    end
    // reset
    rst = 1'b1; in_valid = 1'b0; x_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    cyc = 0; first_out = -1; nout = 0;
    while (nout < LEN) begin
      if (cyc < LEN) begin
        in_valid = 1'b1;
        x_in = xs[cyc];
      end else begin
        in_valid = 1'b0;
        x_in = '0;
      end
      @(posedge clk);
      #1;
      cyc++;
      if (out_valid) begin
        if (first_out < 0) begin
          first_out = cyc;
          checks++;
          if (first_out != int'(LAT)) begin
            failures++;
            $display("latency %0d, expected %0d", first_out, LAT);
          end
        end
        check_output(nout);
        nout++;
      end
      if (cyc > int'(LEN + LAT) + 10) begin
        failures++;
        $display("outputs missing in stream %0d", mode);
        break;
      end
    end
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; x_in = '0;
    for (int j = 0; j < D; j++)
      for (int k = 0; k < NT; k++) begin
        beta257[j][k] = 9'h100;
        beta17[j][k]  = 5'h10;
      end
    for (int mode = 0; mode < 4; mode++) run_stream(mode);
    checks += 4;
    if (n_overflow == 0)    begin failures++; $display("no overflow seen"); end
    if (n_negative == 0)    begin failures++; $display("no negative coefficient seen"); end
    if (n_zero_sample == 0) begin failures++; $display("no zero sample seen"); end
    if (n_exact == 0)       begin failures++; $display("no exact result seen"); end
    $display("events: overflow=%0d negative=%0d zero_samples=%0d exact=%0d",
             n_overflow, n_negative, n_zero_sample, n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
