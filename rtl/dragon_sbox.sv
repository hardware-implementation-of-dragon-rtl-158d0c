// One 8x32-bit Dragon S-box (S1 or S2) as a look-up table.
//
// The table is a 256-entry array of 32-bit words read combinationally: the
// word for addr appears on data in the same cycle, so the whole F-function can
// settle within one clock. Each G/H lookup gets its own copy of the table, so
// all 24 lookups of an F evaluation happen in parallel.
//
// Contents: when INIT_FILE is empty the table is filled from
// dragon_pkg::sbox_value(), a stand-in for the published Dragon tables. Give
// INIT_FILE the name of a hex file with the 256 words of the published S1 (or
// S2) to obtain the standard cipher; nothing else in the core changes.
//
// Parameters: SEL picks S1 or S2; INIT_FILE optionally names a $readmemh file.
module dragon_sbox
  import dragon_pkg::*;
#(
  parameter sbox_sel_e SEL       = SBOX_S1,
  parameter string     INIT_FILE = ""
) (
  input  logic [7:0] addr,
  output word_t      data
);

  word_t rom [256];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, rom);
    end else begin
      for (int i = 0; i < 256; i++) rom[i] = sbox_value(SEL, 8'(i));
    end
  end

  assign data = rom[addr];

endmodule
