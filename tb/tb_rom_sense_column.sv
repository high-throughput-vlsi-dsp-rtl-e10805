// tb_rom_sense_column: programs a 64-row column with a fixed pseudo-random
// pattern and reads every (word line, column) pair with a one-hot word-line
// vector; the output must be the programmed site.  Also: no word line active
// reads 0.
module tb_rom_sense_column;
  localparam logic [255:0] PAT = 256'hC3A5_0F1E_9B7D_2468_ACE0_1357_9BDF_F00F_5A5A_3C3C_8421_1248_DEAD_BEEF_0123_4567;
  logic [63:0] wl;
  logic [1:0]  a_lo;
  logic        dout;
  int checks = 0, failures = 0;

  rom_sense_column #(.ROWS(64), .CELLS(PAT)) dut (.wl, .a_lo, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 64; r++) begin
      for (int col = 0; col < 4; col++) begin
        wl = 64'd1 << r; a_lo = 2'(col);
        #1;
        checks++;
        if (dout != PAT[4*r + col]) failures++;
      end
    end
    wl = '0; a_lo = 2'd0;
    #1;
    checks++;
    if (dout != 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
