// dim1_normalize: resolves the pending carry at the end of a MAC chain.
//
// A MAC chain leaves its result as a code s plus a carry c whose inverse is
// still to be added at the LSB.  This block adds (1-c) to s, giving the
// diminished-one code d1 (2^NB for zero), and adds 1 more to give the normal
// form val = (d1 + 1) mod (2^NB + 1) in 0..2^NB.  Both additions use the
// EMODL fast adder.  The document names the step (a fast adder adding "1" and
// the carry); returning both codes is this design's choice, since the subpaths
// take diminished-one input and the RNS converter takes normal form.
// One register stage; reset gives the zero code and 0.
module dim1_normalize #(
  parameter int unsigned NB = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [NB:0] s,
  input  logic        c,
  output logic [NB:0] d1,
  output logic [NB:0] val
);
  logic [NB:0] d1_n, inc_n;
  logic        co1, co2;

  emodl_adder #(.W(NB+1)) u_add_carry (
    .a(s), .b('0), .cin(~c), .s(d1_n), .cout(co1)
  );
  emodl_adder #(.W(NB+1)) u_add_one (
    .a(d1_n), .b('0), .cin(1'b1), .s(inc_n), .cout(co2)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      d1  <= {1'b1, {NB{1'b0}}};
      val <= '0;
    end else begin
      d1  <= d1_n;
      val <= d1_n[NB] ? '0 : inc_n;
    end
  end

endmodule
