// dim1_to_index: the I(X+1) table at the input of a MAC chain.
//
// Takes a diminished-one code X (NB+1 bits; X = 2^NB stands for zero) and
// returns the index form of the residue X+1: {NAN, k} with g^k = X+1 (g = 3),
// or NAN = 1 with k = 0 for zero.  The table has 2^NB entries, computed at
// elaboration; the zero code bypasses it.  One register stage (the table read
// belongs to a pipeline stage of its own); reset gives the zero code.
module dim1_to_index
  import mrrns_pkg::*;
#(
  parameter int unsigned NB = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [NB:0] d1,
  output logic [NB:0] idx
);
  localparam int unsigned P = (1 << NB) + 1;

  typedef logic [NB-1:0] tab_t [2**NB];

  // LOG_TAB[v] = k with g^k = v + 1, filled by stepping through the powers of g
  function automatic tab_t build_log();
    tab_t        t;
    int unsigned x;
    x = 1;
    for (int unsigned k = 0; k < 2**NB; k++) begin
      t[x - 1] = NB'(k);
      x = (x * GEN) % P;
    end
    return t;
  endfunction

  localparam tab_t LOG_TAB = build_log();

  always_ff @(posedge clk) begin
    if (rst)        idx <= {1'b1, {NB{1'b0}}};
    else if (d1[NB]) idx <= {1'b1, {NB{1'b0}}};
    else             idx <= {1'b0, LOG_TAB[d1[NB-1:0]]};
  end

endmodule
