// poly_map_array: systolic matrix-vector product over GF(2^NB + 1),
//   x_j = sum_i w[i][j] * gamma_i   (i < ROWS, j < COLS),
// used for both polynomial maps (forward 4x5, inverse 5x5).
//
// A ROWS x COLS grid of fermat_mac cells: M(i,j) multiplies gamma_i by the
// weight w[i][j].  Input i is delayed by i registers (input skew), then runs
// right along its row with one register between columns; partial sums run
// down each column through the MACs' own output registers, starting from the
// zero code.  Column j's result is delayed by COLS-1-j registers (output
// deskew) so all outputs of one input vector leave together.  Inputs and
// weights are in index form; the results keep the MAC code (s, pending carry).
// Grid, skew and deskew follow the document's inverse-mapping array.
//
// Timing: a vector at cycle t gives its results at cycle
// t + mrrns_pkg::lat_array(ROWS, COLS) = t + ROWS + COLS + 1; one vector per clock.
module poly_map_array #(
  parameter int unsigned NB   = 8,
  parameter int unsigned ROWS = 5,
  parameter int unsigned COLS = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [NB:0] gamma [ROWS],          // {NAN, index}
  input  logic [NB:0] w     [ROWS][COLS],    // {NAN, index}
  output logic [NB:0] x_s   [COLS],
  output logic        x_c   [COLS]
);
  localparam logic [NB:0] ZERO = {1'b1, {NB{1'b0}}};

  // Row i is a delay line: dl[t] is gamma_i delayed t cycles.  Column j of
  // row i taps it at t = i + j (i skew registers, then j row registers).
  logic [NB:0] cs [ROWS][COLS];
  logic        cc [ROWS][COLS];

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    logic [NB:0] dl [i + COLS];
    assign dl[0] = gamma[i];
    for (genvar t = 1; t < i + COLS; t++) begin : g_dly
      always_ff @(posedge clk) dl[t] <= rst ? ZERO : dl[t-1];
    end
    for (genvar j = 0; j < COLS; j++) begin : g_col
      fermat_mac #(.NB(NB)) u_mac (
        .clk       (clk),
        .rst       (rst),
        .alpha     (dl[i + j]),
        .beta      (w[i][j]),
        .c_in      ((i == 0) ? ZERO : cs[(i == 0) ? 0 : i-1][j]),
        .carry_in  ((i == 0) ? 1'b1 : cc[(i == 0) ? 0 : i-1][j]),
        .c_out     (cs[i][j]),
        .carry_out (cc[i][j])
      );
    end
  end

  // Output deskew: column j passes COLS-1-j registers.
  for (genvar j = 0; j < COLS; j++) begin : g_out
    logic [NB:0] ds [COLS - j];
    logic        dc [COLS - j];
    assign ds[0] = cs[ROWS-1][j];
    assign dc[0] = cc[ROWS-1][j];
    for (genvar t = 1; t < COLS - j; t++) begin : g_dly
      always_ff @(posedge clk) begin
        ds[t] <= rst ? ZERO : ds[t-1];
        dc[t] <= rst ? 1'b1 : dc[t-1];
      end
    end
    assign x_s[j] = ds[COLS-1-j];
    assign x_c[j] = dc[COLS-1-j];
  end

endmodule
