// emodl_adder4: 4-bit EMODL adder tree module.
//
// Four emodl_bit levels on one dual-rail carry chain (c, ct); every level
// gives its own sum bit, so the tree has multiple outputs.  The carry comes in
// and leaves on both rails, so modules cascade directly (through an
// X-connector in the circuit, which restores the two rails and is logically
// transparent).  Combinational.  Structure as in the document's 4-bit tree.
module emodl_adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       c0,     // carry in, true rail
  input  logic       ct0,    // carry in, pseudo-complement rail
  output logic [3:0] s,
  output logic       cout,
  output logic       ctout
);
  logic [4:0] c;
  logic [4:0] ct;

  assign c[0]  = c0;
  assign ct[0] = ct0;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    emodl_bit u_bit (
      .a(a[i]), .b(b[i]), .c(c[i]), .ct(ct[i]),
      .s(s[i]), .co(c[i+1]), .cto(ct[i+1])
    );
  end

  assign cout  = c[4];
  assign ctout = ct[4];

endmodule
