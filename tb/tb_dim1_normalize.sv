// tb_dim1_normalize: every residue of GF(257) and GF(17) in both accumulator
// encodings (pending carry 0 and 1, where the code allows it); one cycle
// later d1 must be the diminished-one code of the residue and val the residue.
module tb_dim1_normalize;
  logic clk = 1'b0, rst;
  logic [8:0] s8, d8, v8;
  logic [4:0] s4, d4, v4;
  logic c8, c4;
  int checks = 0, failures = 0;

  dim1_normalize           dut8 (.clk, .rst, .s(s8), .c(c8), .d1(d8), .val(v8));
  dim1_normalize #(.NB(4)) dut4 (.clk, .rst, .s(s4), .c(c4), .d1(d4), .val(v4));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // residue v (0..p-1) -> (s, c); pend = 1 asks for a pending carry
  task automatic enc(input int v, input int p, input int pend, output int s, output bit c);
    int d;
    d = (v == 0) ? p - 1 : v - 1;        // diminished-one code
    if (pend != 0 && d >= 1 && d - 1 < p - 2) begin s = d - 1; c = 0; end
    else begin s = d; c = 1; end
  endtask

  initial begin
    rst = 1; s8 = 9'h100; c8 = 1; s4 = 5'h10; c4 = 1;
    @(posedge clk); #1 rst = 0;
    for (int v = 0; v < 257; v++) begin
      for (int pend = 0; pend < 2; pend++) begin
        int s, vs;
        bit c;
        enc(v, 257, pend, s, c);
        s8 = 9'(s); c8 = c;
        enc(v % 17, 17, pend, s, c);
        s4 = 5'(s); c4 = c;
        @(posedge clk); #1;
        checks += 4;
        if (int'(v8) != v)                        failures++;
        if (int'(d8) != ((v == 0) ? 256 : v - 1)) failures++;
        vs = v % 17;
        if (int'(v4) != vs)                       failures++;
        if (int'(d4) != ((vs == 0) ? 16 : vs - 1)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
