// emodl_adder: W-bit binary adder built as a cascade of 4-bit EMODL trees.
//
// An input stage turns the single carry-in into the two carry rails (c, ct =
// ~cin); then ceil(W/4) emodl_adder4 modules follow, each handing both rails
// to the next.  In the circuit an X-connector sits between trees to speed up
// the discharge; it does not change the logic, so the trees connect directly
// here.  Operands narrower than a multiple of 4 are zero-extended and the
// carry-out is taken at bit W.  An assertion checks that the two rails stay
// complementary.  Combinational.
//
// Interface: a + b + cin = {cout, s}.
module emodl_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NT = (W + 3) / 4;
  localparam int unsigned WE = 4 * NT;

  logic [WE-1:0] ae, be, se;
  logic [NT:0]   c, ct;

  assign ae    = WE'(a);
  assign be    = WE'(b);
  assign c[0]  = cin;
  assign ct[0] = ~cin;

  for (genvar t = 0; t < NT; t++) begin : g_tree
    emodl_adder4 u_tree (
      .a(ae[4*t +: 4]), .b(be[4*t +: 4]), .c0(c[t]), .ct0(ct[t]),
      .s(se[4*t +: 4]), .cout(c[t+1]), .ctout(ct[t+1])
    );
  end

  assign s = se[W-1:0];
  if (WE == W) begin : g_full
    assign cout = c[NT];
  end else begin : g_part
    assign cout = se[W];
  end

  always_comb begin
    assert (ct[NT] == ~c[NT]) else $error("emodl_adder: carry rails not complementary");
  end

endmodule
