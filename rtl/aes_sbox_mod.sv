// aes_sbox_mod: the modified S-box, one byte in, one byte out, purely
// combinational.
//
// Input byte x is first mapped to PRIM_ELEM^x mod 257, an element of the
// multiplicative group of F_257 (the value 256, reached at x = {80}, is read
// as {00}); that value is then replaced by its multiplicative inverse in
// GF(2^8) modulo FIELD_POLY, {00} kept as {00}. There is no affine step.
// Because 3 is a primitive root of 257 the map is a permutation. The table is
// computed at elaboration (aes_pkg::mod_sbox_table) and synthesises to a
// flat look-up table, the same form as the standard S-box it replaces.
// The default polynomial x^8+x^6+x^5+x+1 is the one the construction names;
// 9'h11B selects the AES field instead.
module aes_sbox_mod #(
  parameter logic [8:0] FIELD_POLY = aes_pkg::MOD_SBOX_POLY,
  parameter int         PRIM_ELEM  = 3
) (
  input  logic [7:0] a,
  output logic [7:0] y
);
  import aes_pkg::*;

  localparam sbox_table_t TABLE = mod_sbox_table(FIELD_POLY[7:0], PRIM_ELEM);

  assign y = TABLE[a];

endmodule
