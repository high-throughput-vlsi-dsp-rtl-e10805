// emodl_bit: one bit level of the EMODL (enhanced multiple-output domino
// logic) adder tree.
//
// The carry travels on two rails, as in the circuit: the true carry c and its
// pseudo-complement ct.  The true rail is set by generate (a & b) or by
// propagate with an incoming carry; the complement rail by kill (~a & ~b) or
// by propagate with an incoming complement carry.  The sum is the XOR of the
// two operand bits with the carry.  Combinational; in the circuit it
// evaluates in one domino phase.  The dual-rail form follows the document;
// the gate-level expression of each rail is this design's own.
module emodl_bit (
  input  logic a,
  input  logic b,
  input  logic c,     // carry in, true rail
  input  logic ct,    // carry in, pseudo-complement rail
  output logic s,
  output logic co,    // carry out, true rail
  output logic cto    // carry out, pseudo-complement rail
);
  logic p;

  always_comb begin
    p   = a ^ b;
    s   = p ^ c;
    co  = (a & b)   | (p & c);
    cto = (~a & ~b) | (p & ct);
  end

endmodule
