// aes_mix_columns: MixColumns. Each column (a0..a3, a0 on row 0) is taken as
// a polynomial over GF(2^8) and multiplied modulo x^4+1 by
// a(x) = {03}x^3 + {01}x^2 + {01}x + {02}, i.e.
//   b_r = {02}a_r ^ {03}a_(r+1) ^ a_(r+2) ^ a_(r+3)   (indices mod 4).
// {02}a is xtime in the AES field and {03}a = xtime(a) ^ a. Combinational.
module aes_mix_columns (
  input  aes_pkg::state_t state_i,
  output aes_pkg::state_t state_o
);
  import aes_pkg::xtime;

  always_comb begin
    logic [3:0][7:0] a;
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = state_i[127-8*(4*c+r) -: 8];
      for (int r = 0; r < 4; r++)
        state_o[127-8*(4*c+r) -: 8] = xtime(a[r])
                                    ^ xtime(a[(r+1)%4]) ^ a[(r+1)%4]
                                    ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
  end
endmodule
