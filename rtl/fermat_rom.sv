// fermat_rom: the 2^NB x NB antilog ROM of the GF(2^NB + 1) MAC.
//
// Word k holds g^k - 1 (g = 3), the diminished-one code of g^k, so the ROM
// turns the sum of two indices into the diminished-one product A*B - 1
// directly.  For NB = 8 it is the 256x8 ROM of the GF(257) MAC, for NB = 4 the
// 16x4 ROM of the GF(17) MAC.  It is built like the dynamic ROM of the
// document: a row decoder on A[NB-1:2] driving 2^(NB-2) word lines, and one
// rom_sense_column per output bit, selecting one of four columns with A1, A0.
// The contents are computed at elaboration from the field arithmetic.
// Combinational read: the MAC registers the output (its second pipeline
// stage).
module fermat_rom
  import mrrns_pkg::*;
#(
  parameter int unsigned NB = 8
) (
  input  logic [NB-1:0] addr,
  output logic [NB-1:0] data
);
  localparam int unsigned P    = (1 << NB) + 1;
  localparam int unsigned ROWS = 2 ** (NB - 2);

  // Programming of output bit b: site (row r, column col) = bit b of word 4r+col.
  function automatic logic [4*ROWS-1:0] cells_of(input int b);
    logic [4*ROWS-1:0] v;
    int unsigned       x;
    x = 1;                                  // g^k, stepped along k
    for (int k = 0; k < 4 * ROWS; k++) begin
      v[k] = 1'(((x - 1) >> b) & 1);
      x    = (x * GEN) % P;
    end
    return v;
  endfunction

  logic [ROWS-1:0] wl;

  rom_row_decoder #(.NB(NB)) u_dec (
    .addr_hi (addr[NB-1:2]),
    .wl      (wl)
  );

  for (genvar b = 0; b < NB; b++) begin : g_bit
    rom_sense_column #(.ROWS(ROWS), .CELLS(cells_of(b))) u_col (
      .wl   (wl),
      .a_lo (addr[1:0]),
      .dout (data[b])
    );
  end

endmodule
