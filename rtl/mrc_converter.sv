// mrc_converter: residue pair (x17, x257) to mixed radix digits (a17, a257)
// with X = a257 + 257 * a17, X in 0..4368.
//
// a257 = x257 and a17 = 9*x17 + 8*x257 (mod 17).  The circuit avoids a
// multiplier:
//   stage 1  r  = 17 - x17                          (table "17 - x")
//   stage 2  q  = r + x257, a 9-bit fast adder;  q = x257 - x17 (mod 17)
//   stage 3  t  = 16 - q[4:1]                       (table "16 - x")
//            m  = q[0] ? (8 + q[8:5]) mod 17 : q[8:5]  (table and 2:1 mux)
//   stage 4  a17 = t + m + 1 (mod 17)
// which uses 8q = 8*q0 - q[4:1] + q[8:5] (mod 17), since 16 = -1 and
// 256 = 1 (mod 17).  The tables, adder and mux and the four register stages
// follow the document's conversion figure; the "+1" at the last adder is
// this design's: with the tables as given the sum alone falls one short of
// 8q (mod 17).  x257 travels alongside in four registers.
//
// Timing: one pair per clock, latency 4.
module mrc_converter (
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] x17,     // 0..16
  input  logic [8:0] x257,    // 0..256
  output logic [4:0] a17,     // 0..16
  output logic [8:0] a257     // 0..256
);
  logic [4:0] r;
  logic [8:0] q;
  logic [8:0] x257_d [3];
  logic [4:0] t, m;

  logic [8:0] q_n;
  logic       q_co;

  emodl_adder #(.W(9)) u_fast_add (
    .a({4'd0, r}), .b(x257_d[0]), .cin(1'b0), .s(q_n), .cout(q_co)
  );

  function automatic logic [4:0] mod17_add3(input logic [4:0] a, input logic [4:0] b);
    logic [5:0] s;
    s = 6'(a) + 6'(b) + 6'd1;
    return (s >= 6'd17) ? 5'(s - 6'd17) : s[4:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      r    <= '0;
      q    <= '0;
      t    <= '0;
      m    <= '0;
      a17  <= '0;
      a257 <= '0;
      for (int i = 0; i < 3; i++) x257_d[i] <= '0;
    end else begin
      // stage 1
      r         <= 5'd17 - x17;
      x257_d[0] <= x257;
      // stage 2
      q         <= q_n;
      x257_d[1] <= x257_d[0];
      // stage 3
      t         <= 5'd16 - {1'b0, q[4:1]};
      m         <= q[0] ? ((q[8:5] + 5'd8 >= 5'd17) ? 5'(q[8:5] + 5'd8 - 5'd17)
                                                    : 5'(q[8:5] + 5'd8))
                        : {1'b0, q[8:5]};
      x257_d[2] <= x257_d[1];
      // stage 4
      a17       <= mod17_add3(t, m);
      a257      <= x257_d[2];
    end
  end

endmodule
