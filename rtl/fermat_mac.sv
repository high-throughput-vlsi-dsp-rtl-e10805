// fermat_mac: multiply-accumulate over GF(2^NB + 1) in the half-index domain
// (NB = 8: GF(257); NB = 4: GF(17)), c_out = A*B + C.
//
// Multiplication happens on indices, addition on diminished-one codes:
//   stage 1  an NB-bit binary adder adds the indices alpha + beta; dropping the
//            carry reduces the sum mod 2^NB = p-1.  Either NAN flag (a zero
//            operand) marks the product as zero;
//   stage 2  the antilog ROM turns the index sum into A*B - 1, the
//            diminished-one product;
//   stage 3  a diminished-one adder adds the product to the incoming
//            accumulator.  The carry from its MSB is not folded back here:
//            it leaves as carry_out, and the next MAC adds it, inverted, at the
//            LSB of its own addition (carry_in).  A zero product is replaced by
//            the zero code 1_0000_0000, and a zero code on either adder input
//            makes the adder pass the other operand, as diminished-one
//            addition requires.
// Accumulator code: c_in/carry_in stand for the diminished-one code
// c_in + (1 - carry_in); c_in has its MSB set only with carry_in = 1, which
// the block preserves (asserted).  A chain starts with c_in = 1_0000_0000 and
// carry_in = 1.
//
// Timing: alpha/beta to c_out 3 clocks, c_in/carry_in to c_out 1 clock.  The
// three stages and the datapath follow the document; the bypass formulation of
// the zero code and the reset values are this design's.
module fermat_mac #(
  parameter int unsigned NB = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [NB:0] alpha,      // {NAN, index} of A
  input  logic [NB:0] beta,       // {NAN, index} of B
  input  logic [NB:0] c_in,
  input  logic        carry_in,
  output logic [NB:0] c_out,
  output logic        carry_out
);
  localparam logic [NB:0] ZERO = {1'b1, {NB{1'b0}}};

  // stage 1: index adder
  logic [NB-1:0] isum_n, isum;
  logic          nan;
  logic          ico;

  emodl_adder #(.W(NB)) u_index_add (
    .a(alpha[NB-1:0]), .b(beta[NB-1:0]), .cin(1'b0), .s(isum_n), .cout(ico)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      isum <= '0;
      nan  <= 1'b1;
    end else begin
      isum <= isum_n;
      nan  <= alpha[NB] | beta[NB];
    end
  end

  // stage 2: antilog ROM, product A*B - 1
  logic [NB-1:0] rom_q, prod;
  logic          pzero;

  fermat_rom #(.NB(NB)) u_rom (
    .addr(isum), .data(rom_q)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      prod  <= '0;
      pzero <= 1'b1;
    end else begin
      prod  <= rom_q;
      pzero <= nan;
    end
  end

  // stage 3: diminished-one adder with inverted carry-in
  logic [NB-1:0] asum;
  logic          aco;
  logic [NB:0]   c_n;
  logic          carry_n;

  emodl_adder #(.W(NB)) u_dim1_add (
    .a(prod), .b(c_in[NB-1:0]), .cin(~carry_in), .s(asum), .cout(aco)
  );

  always_comb begin
    if (pzero) begin
      c_n     = c_in;              // product is the zero code: pass C
      carry_n = carry_in;
    end else if (c_in[NB]) begin
      c_n     = {1'b0, prod};      // C is the zero code: pass the product
      carry_n = 1'b1;
    end else begin
      c_n     = {1'b0, asum};
      carry_n = aco;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      c_out     <= ZERO;
      carry_out <= 1'b1;
    end else begin
      c_out     <= c_n;
      carry_out <= carry_n;
    end
  end

  a_zero_code : assert property (@(posedge clk) disable iff (rst) c_in[NB] |-> carry_in)
    else $error("fermat_mac: zero code with a pending carry");

endmodule
