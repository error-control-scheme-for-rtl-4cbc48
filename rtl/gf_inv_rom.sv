// gf_inv_rom: GF(2^8) inversion look-up ROM used by the Forney evaluator.
//
// A 256-entry table with inv[a] * a = 1 for a != 0 and inv[0] = 0. The table
// contents are computed at elaboration from the field arithmetic (a^-1 = a^254),
// so no data file is needed. Combinational read: the address is the value to be
// inverted and the data is its inverse in the same cycle, as a ROM in the
// correction path of the decoder would be.
module gf_inv_rom
  import gf_pkg::*;
(
  input  gf_t addr,
  output gf_t data
);
  typedef gf_t rom_t [256];
  function automatic rom_t make_rom();
    rom_t t;
    for (int i = 0; i < 256; i++) t[i] = gf_inv(gf_t'(i));
    return t;
  endfunction

  localparam rom_t ROM = make_rom();

  assign data = ROM[addr];
endmodule
