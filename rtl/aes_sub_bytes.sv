// aes_sub_bytes: SubBytes. Sixteen S-box instances substitute every byte of
// the 128-bit State independently. Combinational; the S-box is chosen by
// SBOX_SEL (modified by default, standard as the alternative).
module aes_sub_bytes #(
  parameter aes_pkg::sbox_sel_e SBOX_SEL   = aes_pkg::SBOX_MODIFIED,
  parameter logic [8:0]         FIELD_POLY = aes_pkg::MOD_SBOX_POLY
) (
  input  aes_pkg::state_t state_i,
  output aes_pkg::state_t state_o
);
  for (genvar n = 0; n < 16; n++) begin : g_byte
    aes_sbox #(.SBOX_SEL(SBOX_SEL), .FIELD_POLY(FIELD_POLY)) u_sbox (
      .a(state_i[127-8*n -: 8]),
      .y(state_o[127-8*n -: 8])
    );
  end
endmodule
