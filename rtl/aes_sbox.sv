// aes_sbox: selects the S-box used throughout the cipher. SBOX_SEL chooses
// the modified S-box (default, the proposed design) or the standard AES one;
// FIELD_POLY is passed to the modified S-box. Combinational, one byte.
module aes_sbox #(
  parameter aes_pkg::sbox_sel_e SBOX_SEL   = aes_pkg::SBOX_MODIFIED,
  parameter logic [8:0]         FIELD_POLY = aes_pkg::MOD_SBOX_POLY
) (
  input  logic [7:0] a,
  output logic [7:0] y
);
  if (SBOX_SEL == aes_pkg::SBOX_MODIFIED) begin : g_mod
    aes_sbox_mod #(.FIELD_POLY(FIELD_POLY)) u_sbox (.a(a), .y(y));
  end else begin : g_std
    aes_sbox_std u_sbox (.a(a), .y(y));
  end
endmodule
