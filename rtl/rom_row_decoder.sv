// rom_row_decoder: word-line decoder of the MAC's antilog ROM.
//
// The ROM is organised as word lines of four words; address bits A1, A0
// choose the column and the upper bits A[NB-1:2] the word line.  Following the
// document's domino decoder, the decoder is built as 2^(NB-3) separate stages
// (32 for the 256x8 ROM) instead of a tree: stage i compares A[NB-2:2] with i,
// and its top transistor pair, driven by A[NB-1] and its complement, steers the
// result onto one of two word lines, the one of the lower half of the address
// space (index i) or of the upper half (index 2^(NB-3) + i).  Exactly one word
// line is high.  Combinational (the circuit precharges on the clock low phase
// and evaluates on the high phase).
//
// Interface: addr_hi = A[NB-1:2]; wl[w] is high for w = addr_hi.
module rom_row_decoder #(
  parameter int unsigned NB = 8
) (
  input  logic [NB-3:0]        addr_hi,
  output logic [2**(NB-2)-1:0] wl
);
  localparam int unsigned NSTG = 2 ** (NB - 3);

  logic top;
  assign top = addr_hi[NB-3];

  for (genvar i = 0; i < NSTG; i++) begin : g_stage
    logic hit;
    if (NB > 3) begin : g_cmp
      assign hit = (addr_hi[NB-4:0] == (NB-3)'(i));
    end else begin : g_one
      assign hit = 1'b1;
    end
    assign wl[i]        = hit & ~top;
    assign wl[NSTG + i] = hit &  top;
  end

endmodule
