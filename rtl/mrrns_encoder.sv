// mrrns_encoder: forward polynomial mapping of one ring (MRRNS encoding).
//
// A 10-bit two's complement sample x is written as a polynomial in X = 8,
//   x = d0 + d1*X + (d2 - 8*s)*X^2,
// with d0 = x[2:0], d1 = x[5:3], d2 = x[8:6] and the sign bit s = x[9] (its
// weight -512 folded into the X^2 coefficient).  The polynomial is evaluated
// at the D points r_j in {0, 1, -1, 2, -2} over GF(2^NB + 1): a 4 x D
// poly_map_array multiplies the input vector (d0, d1, d2, s) by the weights
// (1, r_j, r_j^2, -8 r_j^2).  The four inputs are put into index form by a
// small table (one register stage); the D results are carry-resolved into
// diminished-one codes, the form the subpaths take.  The 4 x 5 MAC count
// follows the document; the digit split and the evaluation points are this
// design's reading.
//
// Timing: one sample per clock; latency mrrns_pkg::lat_encoder() = 12.
module mrrns_encoder
  import mrrns_pkg::*;
#(
  parameter int unsigned NB = 8,
  parameter int unsigned D  = 5
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x_in,
  output logic [NB:0]              y_d1 [D]     // diminished-one X(r_j)
);
  localparam int unsigned P = (1 << NB) + 1;

  // weight matrix in index form, computed at elaboration
  logic [NB:0] W [N_IN][D];
  for (genvar i = 0; i < N_IN; i++) begin : g_wr
    for (genvar j = 0; j < D; j++) begin : g_wc
      assign W[i][j] = (NB+1)'(to_index(fwd_weight(i, j, P), P, NB));
    end
  end

  // digit values -> index form (zero -> NAN)
  logic [NB:0] g_idx [N_IN];
  logic [DATA_W-1:0] xu;
  assign xu = x_in;

  always_ff @(posedge clk) begin
    for (int i = 0; i < N_IN; i++) begin
      int unsigned v;
      v = (i < 3) ? int'(xu[X_BITS*i +: X_BITS]) : int'(xu[DATA_W-1]);
      g_idx[i] <= rst ? {1'b1, {NB{1'b0}}} : (NB+1)'(to_index(v, P, NB));
    end
  end

  logic [NB:0] xs [D];
  logic        xc [D];

  poly_map_array #(.NB(NB), .ROWS(N_IN), .COLS(D)) u_array (
    .clk(clk), .rst(rst), .gamma(g_idx), .w(W), .x_s(xs), .x_c(xc)
  );

  for (genvar j = 0; j < D; j++) begin : g_norm
    logic [NB:0] val_unused;
    dim1_normalize #(.NB(NB)) u_norm (
      .clk(clk), .rst(rst), .s(xs[j]), .c(xc[j]), .d1(y_d1[j]), .val(val_unused)
    );
  end

endmodule
