// mrrns_fir: N_TAPS-tap FIR filter computed by modulus replication over the
// Fermat rings GF(257) and GF(17).
//
//   y(n) = sum_{k<N_TAPS} h_k * x(n-k),   x and h 10-bit two's complement.
//
// Each sample is written as a polynomial in X = 8 with small coefficients and
// evaluated at D = 5 points in both rings (mrrns_encoder).  In each ring the
// D evaluations are filtered independently by D identical systolic MAC
// chains (fir_subpath), then the inverse polynomial map gives the D
// coefficients of the result polynomial modulo 257 and modulo 17
// (mrrns_inverse_map).  Each coefficient pair is converted from the {17, 257}
// residue system to a number 0..4368 by mixed radix conversion
// (mrc_converter) and read as signed (-2184..2184); the final adder sums the
// coefficients with weights 8^k.  The result is exact as long as no result
// coefficient leaves -2184..2184; otherwise it is wrong in the weights of the
// coefficients that overflowed (the filter has no overflow detection).
//
// The filter coefficients are given in the form the subpath MACs hold them:
// beta257[j][k] and beta17[j][k] are the index forms of h_k's digit
// polynomial evaluated at point j (mrrns_pkg::coef_index computes them).
//
// Interface: one sample per clock when in_valid is high; out_valid marks y_out
// lat_fir(N_TAPS) cycles later.  The filter pipeline runs every cycle; a cycle
// with in_valid low still shifts x_in into the filter history.  rst is
// synchronous, active high, and clears the history to zero.
// Defaults are the document's main configuration (150 taps, d = 5, 10-bit
// data and coefficients).
module mrrns_fir
  import mrrns_pkg::*;
#(
  parameter int unsigned N_TAPS = 150,
  parameter int unsigned D      = 5,
  parameter int unsigned Y_W    = 26
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic [8:0]               beta257 [D][N_TAPS],
  input  logic [4:0]               beta17  [D][N_TAPS],
  output logic                     out_valid,
  output logic signed [Y_W-1:0]    y_out,
  output logic [D-1:0]             coef_neg
);
  localparam int unsigned LAT = lat_fir(N_TAPS);

  logic signed [DATA_W-1:0] x_r;
  always_ff @(posedge clk) x_r <= rst ? '0 : x_in;

  logic [8:0] c257 [D];
  logic [4:0] c17  [D];

  mrrns_ring_path #(.NB(8), .D(D), .N_TAPS(N_TAPS)) u_ring257 (
    .clk(clk), .rst(rst), .x_in(x_r), .beta(beta257), .coef(c257)
  );

  mrrns_ring_path #(.NB(4), .D(D), .N_TAPS(N_TAPS)) u_ring17 (
    .clk(clk), .rst(rst), .x_in(x_r), .beta(beta17), .coef(c17)
  );

  logic [4:0] a17  [D];
  logic [8:0] a257 [D];

  for (genvar k = 0; k < D; k++) begin : g_mrc
    mrc_converter u_mrc (
      .clk(clk), .rst(rst), .x17(c17[k]), .x257(c257[k]),
      .a17(a17[k]), .a257(a257[k])
    );
  end

  final_adder #(.D(D), .Y_W(Y_W)) u_final (
    .clk(clk), .rst(rst), .a17(a17), .a257(a257), .y(y_out), .neg(coef_neg)
  );

  // valid flag follows the pipeline
  logic [LAT-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[LAT-2:0], in_valid};
  end
  assign out_valid = vpipe[LAT-1];

endmodule
