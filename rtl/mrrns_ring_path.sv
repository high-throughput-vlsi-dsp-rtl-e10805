// mrrns_ring_path: everything the filter computes in one ring GF(2^NB + 1):
// forward polynomial map, D replicated FIR subpaths and inverse map.
//
// The D subpaths are identical N_TAPS-tap systolic filters, each fed with the
// sample polynomial evaluated at its own point r_j and holding the
// coefficients evaluated at the same point (beta[j][k], index form).  Since
// evaluation turns polynomial multiplication into pointwise multiplication,
// the inverse map recovers the D coefficients of
//   sum_k h_k(X) * x_{n-k}(X)   (mod 2^NB + 1).
// Structure as in the document's architecture figure (one row of it).
//
// Timing: one sample per clock; latency mrrns_pkg::lat_ring_path(N_TAPS).
module mrrns_ring_path
  import mrrns_pkg::*;
#(
  parameter int unsigned NB     = 8,
  parameter int unsigned D      = 5,
  parameter int unsigned N_TAPS = 150
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic [NB:0]              beta [D][N_TAPS],
  output logic [NB:0]              coef [D]
);
  logic [NB:0] enc [D];
  logic [NB:0] sub [D];

  mrrns_encoder #(.NB(NB), .D(D)) u_enc (
    .clk(clk), .rst(rst), .x_in(x_in), .y_d1(enc)
  );

  for (genvar j = 0; j < D; j++) begin : g_sub
    logic [NB:0] val_unused;
    fir_subpath #(.NB(NB), .N_TAPS(N_TAPS)) u_sub (
      .clk(clk), .rst(rst), .a_in(enc[j]), .beta(beta[j]),
      .y_d1(sub[j]), .y_val(val_unused)
    );
  end

  mrrns_inverse_map #(.NB(NB), .D(D)) u_inv (
    .clk(clk), .rst(rst), .g_d1(sub), .coef(coef)
  );

endmodule
