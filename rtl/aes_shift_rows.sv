// aes_shift_rows: ShiftRows. Row r of the 4x4 State is rotated left by r
// byte positions: s'(r,c) = s(r,(c+r) mod 4); row 0 is unchanged. Pure
// wiring, no logic. Byte n of the flat State is s(n%4, n/4).
module aes_shift_rows (
  input  aes_pkg::state_t state_i,
  output aes_pkg::state_t state_o
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        state_o[127-8*(4*c+r) -: 8] = state_i[127-8*(4*((c+r)%4)+r) -: 8];
  end
endmodule
