// rom_sense_column: one output bit of the antilog ROM, i.e. the storage
// transistors of that bit, the four column decoders and the sense amplifier.
//
// Each of the four columns is a bit line with one cell site per word line; a
// site either holds a storage transistor (the bit reads 1) or not (it reads
// 0).  The column decoder selected by A1, A0 connects its bit line to the
// precharged evaluation node, which discharges through the storage transistor
// of the active word line when one is present, and the output stage turns
// that into a 1.  CELLS holds the programming: bit 4*r + col is the site on
// word line r in column col.  Combinational (one evaluation phase).  The
// reading "transistor present gives 1" follows the document; the cell order is
// this design's choice.
module rom_sense_column #(
  parameter int unsigned           ROWS  = 64,
  parameter logic [4*ROWS-1:0]     CELLS = '0
) (
  input  logic [ROWS-1:0] wl,
  input  logic [1:0]      a_lo,   // {A1, A0}
  output logic            dout
);
  always_comb begin
    dout = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      if (wl[r] && CELLS[4*r + int'(a_lo)]) dout = 1'b1;
    end
  end

endmodule
