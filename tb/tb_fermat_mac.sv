// tb_fermat_mac: random streams into the GF(257) and GF(17) MACs, a new
// A, B and C every cycle, including zero operands and accumulators with and
// without a pending carry.  The output at cycle t must be
// A(t-3) * B(t-3) + C(t-1) (mod p), which fixes the three-stage timing.
// Operands are put into index form by a brute-force search here.
module tb_fermat_mac;
  localparam int NCYC = 4000;
  logic clk = 1'b0, rst;
  logic [8:0] al8, be8, ci8, co8;
  logic [4:0] al4, be4, ci4, co4;
  logic cy8, cyo8, cy4, cyo4;
  int checks = 0, failures = 0;
  int av8 [NCYC], bv8 [NCYC], cv8 [NCYC], av4 [NCYC], bv4 [NCYC], cv4 [NCYC];
  int n_zero = 0, n_pend = 0;

  fermat_mac           dut8 (.clk, .rst, .alpha(al8), .beta(be8), .c_in(ci8), .carry_in(cy8),
                             .c_out(co8), .carry_out(cyo8));
  fermat_mac #(.NB(4)) dut4 (.clk, .rst, .alpha(al4), .beta(be4), .c_in(ci4), .carry_in(cy4),
                             .c_out(co4), .carry_out(cyo4));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
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

  task automatic enc(input int v, input int p, input int pend, output int s, output bit c);
    int d;
    d = (v == 0) ? p - 1 : v - 1;
    if (pend != 0 && d >= 1 && d - 1 < p - 2) begin s = d - 1; c = 0; end
    else begin s = d; c = 1; end
  endtask

  function automatic int dec(input int s, input bit c, input int p);
    return (s + (c ? 0 : 1) + 1) % p;
  endfunction

  function automatic int pick(input int p);
    int r = int'($urandom_range(0, 9));
    if (r == 0) return 0;
    if (r == 1) return p - 1;
    return int'($urandom_range(0, p - 1));
  endfunction

  initial begin
    rst = 1; al8 = 9'h100; be8 = 9'h100; ci8 = 9'h100; cy8 = 1;
    al4 = 5'h10; be4 = 5'h10; ci4 = 5'h10; cy4 = 1;
    @(posedge clk); #1 rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      int s; bit c; int pend;
      av8[t] = pick(257); bv8[t] = pick(257); cv8[t] = pick(257);
      av4[t] = pick(17);  bv4[t] = pick(17);  cv4[t] = pick(17);
      if (av8[t] == 0 || bv8[t] == 0) n_zero++;
      al8 = 9'(idx(av8[t], 257, 8)); be8 = 9'(idx(bv8[t], 257, 8));
      al4 = 5'(idx(av4[t], 17, 4));  be4 = 5'(idx(bv4[t], 17, 4));
      pend = int'($urandom_range(0, 1));
      enc(cv8[t], 257, pend, s, c); ci8 = 9'(s); cy8 = c;
      if (!c) n_pend++;
      enc(cv4[t], 17, pend, s, c);  ci4 = 5'(s); cy4 = c;
      @(posedge clk); #1;
      // output now belongs to A,B of cycle t-2 (sampled 3 edges ago) and C of cycle t
      if (t >= 2) begin
        checks += 2;
        if (dec(int'(co8), cyo8, 257) != (av8[t-2] * bv8[t-2] + cv8[t]) % 257) begin
          failures++;
          if (failures < 5) $display("GF257 t=%0d got %0d", t, dec(int'(co8), cyo8, 257));
        end
        if (dec(int'(co4), cyo4, 17) != (av4[t-2] * bv4[t-2] + cv4[t]) % 17) failures++;
        checks++;
        if (co8[8] && !cyo8) failures++;
      end
    end
    checks++;
    if (n_zero == 0 || n_pend == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
