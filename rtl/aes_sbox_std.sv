// aes_sbox_std: the standard AES S-box, one byte in, one byte out,
// purely combinational.
//
// Each entry is the multiplicative inverse of the input in GF(2^8) modulo
// x^8+x^4+x^3+x+1 ({00} kept as {00}), followed by the affine map
// b'_j = b_j ^ b_(j+4) ^ b_(j+5) ^ b_(j+6) ^ b_(j+7) ^ c_j with c = {63}.
// The 256 entries are computed at elaboration (aes_pkg::std_sbox_table) and
// synthesise to a flat look-up table. It is the reference against which the
// modified S-box is compared, and can be selected in the cipher with
// SBOX_SEL = SBOX_STANDARD.
module aes_sbox_std (
  input  logic [7:0] a,
  output logic [7:0] y
);
  import aes_pkg::*;

  localparam sbox_table_t TABLE = std_sbox_table();

  assign y = TABLE[a];

endmodule
