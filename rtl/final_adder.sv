// final_adder: weighted sum of the D result coefficients,
//   y = sum_k 8^k * C_k,   C_k = a257_k + 257 * a17_k,
// as one carry-save array and a final fast adder.
//
// 257 * a17 is split into a17 + 256 * a17, so every coefficient gives three
// shifted rows (a257 and a17 at bit 3k, a17 at bit 3k+8), as in the
// document's bit map of the final addition.  The coefficients are signed:
// C_k above (17*257-1)/2 = 2184 stands for C_k - 4369, so a fourth row,
// -4369 * 8^k, is added for every such coefficient (this sign handling is
// this design's own; the bit map shows only the unsigned rows).  The rows are
// compressed by 3:2 carry-save adders to two, registered, and added by an
// EMODL fast adder.  neg reports which coefficients were read as negative.
//
// Timing: one set per clock, latency 2.
module final_adder
  import mrrns_pkg::*;
#(
  parameter int unsigned D   = 5,
  parameter int unsigned Y_W = 26
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [4:0]            a17  [D],
  input  logic [8:0]            a257 [D],
  output logic signed [Y_W-1:0] y,
  output logic [D-1:0]          neg
);
  localparam int unsigned NROW = 4 * D;

  logic [Y_W-1:0] rows [NROW];
  logic [D-1:0]   neg_n;
  logic [Y_W-1:0] cs_s, cs_c;
  logic [Y_W-1:0] s1, c1;
  logic [D-1:0]   neg1;

  always_comb begin
    for (int k = 0; k < D; k++) begin
      neg_n[k] = (a17[k] > 5'd8) || (a17[k] == 5'd8 && a257[k] > 9'd128);
      rows[4*k]     = Y_W'(a257[k]) << (3 * k);
      rows[4*k + 1] = Y_W'(a17[k])  << (3 * k);
      rows[4*k + 2] = Y_W'(a17[k])  << (3 * k + 8);
      rows[4*k + 3] = neg_n[k] ? Y_W'(-(longint'(M_RNS) << (3 * k))) : '0;
    end
    // 3:2 carry-save reduction
    cs_s = rows[0];
    cs_c = rows[1];
    for (int r = 2; r < NROW; r++) begin
      logic [Y_W-1:0] ns, nc;
      ns   = cs_s ^ cs_c ^ rows[r];
      nc   = ((cs_s & cs_c) | (cs_s & rows[r]) | (cs_c & rows[r])) << 1;
      cs_s = ns;
      cs_c = nc;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1   <= '0;
      c1   <= '0;
      neg1 <= '0;
    end else begin
      s1   <= cs_s;
      c1   <= cs_c;
      neg1 <= neg_n;
    end
  end

  logic [Y_W-1:0] sum_n;
  logic           sum_co;

  emodl_adder #(.W(Y_W)) u_cpa (
    .a(s1), .b(c1), .cin(1'b0), .s(sum_n), .cout(sum_co)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      y   <= '0;
      neg <= '0;
    end else begin
      y   <= signed'(sum_n);
      neg <= neg1;
    end
  end

endmodule
