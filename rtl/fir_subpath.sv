// fir_subpath: one MRRNS subpath, an N_TAPS-tap FIR filter over GF(2^NB + 1).
//
// The incoming diminished-one sample is turned into index form by the I(X+1)
// table, then runs along a systolic chain of fermat_mac cells.  In every cell
// the sample passes two registers (the MAC taps it between them) and the
// partial sum one (the MAC's output register), so a partial sum started at
// cell 0 meets ever older samples and leaves the last cell as
//   y(n) = sum_k beta_k * a(n - k)   (mod p),
// with beta_k the coefficient value of tap k given in index form.  The chain
// starts from the zero code, and its end is carry-resolved to a diminished-one
// code.  Structure (two data registers, one sum register per cell, index
// mapping at the input, zero-code start) follows the document.
//
// Timing: one sample per clock; a_in at cycle t shows up in y_d1 from cycle
// t + mrrns_pkg::lat_subpath(N_TAPS) on.
module fir_subpath #(
  parameter int unsigned NB     = 8,
  parameter int unsigned N_TAPS = 150
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [NB:0] a_in,                // diminished-one sample
  input  logic [NB:0] beta [N_TAPS],       // {NAN, index} of each coefficient
  output logic [NB:0] y_d1,                // diminished-one result
  output logic [NB:0] y_val                // the same, normal form
);
  localparam logic [NB:0] ZERO_D1  = {1'b1, {NB{1'b0}}};
  localparam logic [NB:0] ZERO_IDX = {1'b1, {NB{1'b0}}};

  logic [NB:0] a_idx;
  logic [NB:0] a1 [N_TAPS];
  logic [NB:0] a2 [N_TAPS];
  logic [NB:0] cs [N_TAPS];
  logic        cc [N_TAPS];

  dim1_to_index #(.NB(NB)) u_in_map (
    .clk(clk), .rst(rst), .d1(a_in), .idx(a_idx)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N_TAPS; k++) begin
        a1[k] <= ZERO_IDX;
        a2[k] <= ZERO_IDX;
      end
    end else begin
      for (int k = 0; k < N_TAPS; k++) begin
        a1[k] <= (k == 0) ? a_idx : a2[k-1];
        a2[k] <= a1[k];
      end
    end
  end

  for (genvar k = 0; k < N_TAPS; k++) begin : g_cell
    fermat_mac #(.NB(NB)) u_mac (
      .clk       (clk),
      .rst       (rst),
      .alpha     (a1[k]),
      .beta      (beta[k]),
      .c_in      ((k == 0) ? ZERO_D1 : cs[(k == 0) ? 0 : k-1]),
      .carry_in  ((k == 0) ? 1'b1    : cc[(k == 0) ? 0 : k-1]),
      .c_out     (cs[k]),
      .carry_out (cc[k])
    );
  end

  dim1_normalize #(.NB(NB)) u_out_norm (
    .clk(clk), .rst(rst), .s(cs[N_TAPS-1]), .c(cc[N_TAPS-1]), .d1(y_d1), .val(y_val)
  );

endmodule
