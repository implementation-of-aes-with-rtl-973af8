// aes_add_round_key: AddRoundKey. Bitwise XOR of the State with one round
// key. The round key holds the Nb = 4 schedule words w[4r..4r+3] of round r,
// w[4r] in bits 127:96, so word c lands on column c. Combinational.
module aes_add_round_key (
  input  aes_pkg::state_t     state_i,
  input  aes_pkg::round_key_t round_key,
  output aes_pkg::state_t     state_o
);
  assign state_o = state_i ^ round_key;
endmodule
