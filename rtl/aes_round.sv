// aes_round: one encryption round, combinational:
//   SubBytes -> ShiftRows -> MixColumns -> AddRoundKey.
// With final_round high MixColumns is bypassed, as the last (Nr-th) round
// of the cipher requires. The cipher core evaluates one round per clock.
module aes_round #(
  parameter aes_pkg::sbox_sel_e SBOX_SEL   = aes_pkg::SBOX_MODIFIED,
  parameter logic [8:0]         FIELD_POLY = aes_pkg::MOD_SBOX_POLY
) (
  input  aes_pkg::state_t     state_i,
  input  aes_pkg::round_key_t round_key,
  input  logic                final_round,
  output aes_pkg::state_t     state_o
);
  import aes_pkg::*;

  state_t sub_s, shift_s, mix_s, pre_ark;

  aes_sub_bytes #(.SBOX_SEL(SBOX_SEL), .FIELD_POLY(FIELD_POLY)) u_sub (
    .state_i(state_i), .state_o(sub_s));
  aes_shift_rows  u_shift (.state_i(sub_s),   .state_o(shift_s));
  aes_mix_columns u_mix   (.state_i(shift_s), .state_o(mix_s));

  assign pre_ark = final_round ? shift_s : mix_s;

  aes_add_round_key u_ark (.state_i(pre_ark), .round_key(round_key), .state_o(state_o));
endmodule
