// mrrns_inverse_map: inverse polynomial mapping of one ring.
//
// The D subpath results gamma_i = Y(r_i) (diminished-one codes) are put into
// index form by I(X+1) tables and multiplied by the inverse Vandermonde matrix
// of the points {0, 1, -1, 2, -2} in a D x D poly_map_array, giving the D
// coefficients of the result polynomial, c_k = sum_i Vinv[k][i] * gamma_i
// (mod 2^NB + 1).  The inverse matrix is computed at elaboration (Lagrange
// basis polynomials).  The array's outputs are then carried to normal form
// by adding 1 and the pending carry.  The 5 x 5 array with skewed inputs and
// deskewed outputs follows the document.
//
// Timing: one vector per clock; latency mrrns_pkg::lat_inverse() = 13.
module mrrns_inverse_map
  import mrrns_pkg::*;
#(
  parameter int unsigned NB = 8,
  parameter int unsigned D  = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [NB:0] g_d1 [D],    // diminished-one subpath results
  output logic [NB:0] coef [D]     // normal-form coefficients, 0..2^NB
);
  localparam int unsigned P = (1 << NB) + 1;

  // weight matrix in index form, computed at elaboration
  logic [NB:0] W [D][D];
  for (genvar i = 0; i < D; i++) begin : g_wr
    for (genvar k = 0; k < D; k++) begin : g_wc
      assign W[i][k] = (NB+1)'(to_index(inv_weight(i, k, P), P, NB));
    end
  end

  logic [NB:0] g_idx [D];
  logic [NB:0] xs [D];
  logic        xc [D];

  for (genvar i = 0; i < D; i++) begin : g_in
    dim1_to_index #(.NB(NB)) u_map (
      .clk(clk), .rst(rst), .d1(g_d1[i]), .idx(g_idx[i])
    );
  end

  poly_map_array #(.NB(NB), .ROWS(D), .COLS(D)) u_array (
    .clk(clk), .rst(rst), .gamma(g_idx), .w(W), .x_s(xs), .x_c(xc)
  );

  for (genvar k = 0; k < D; k++) begin : g_norm
    logic [NB:0] d1_unused;
    dim1_normalize #(.NB(NB)) u_norm (
      .clk(clk), .rst(rst), .s(xs[k]), .c(xc[k]), .d1(d1_unused), .val(coef[k])
    );
  end

endmodule
