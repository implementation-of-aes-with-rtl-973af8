// aes_pkg: types, sizes and GF(2^8) helpers shared by the AES encryption core.
//
// The 128-bit State is carried as a flat vector with byte n of the block in
// bits [127-8n -: 8]; byte n sits at row n%4, column n/4 of the 4x4 state
// matrix, so each 32-bit column is a contiguous slice. Key lengths of 128,
// 192 and 256 bits (Nk = 4, 6, 8 words, Nr = 10, 12, 14 rounds) are selected
// at run time with key_len_e.
//
// The two S-box tables are built at elaboration by constant functions that
// follow the constructions literally, so no table of numbers is pasted in:
//   standard: y = affine(inv(x)) in GF(2^8) mod x^8+x^4+x^3+x+1, c = {63};
//   modified: y = inv(g^x mod 257) in GF(2^8) mod FIELD_POLY, where g = 3 is
//             a primitive root of F_257 and the value 256 (g^128) stands for 00.
// The modified construction and the primitive element 3 are the design's
// proposal; its default field polynomial x^8+x^6+x^5+x+1 is the one named
// with it. MixColumns and Rcon always use the AES field.
package aes_pkg;

  localparam int NB        = 4;   // columns of the State
  localparam int MAX_NK    = 8;   // words in the longest key
  localparam int MAX_NR    = 14;  // rounds for the longest key
  localparam int MAX_WORDS = NB * (MAX_NR + 1);  // 60 key-schedule words

  localparam logic [8:0] AES_POLY      = 9'h11B;  // x^8+x^4+x^3+x+1
  localparam logic [8:0] MOD_SBOX_POLY = 9'h163;  // x^8+x^6+x^5+x+1

  typedef logic [127:0] state_t;
  typedef logic [127:0] round_key_t;
  typedef logic [31:0]  word_t;

  typedef enum logic [1:0] {
    KEY_128 = 2'd0,
    KEY_192 = 2'd1,
    KEY_256 = 2'd2
  } key_len_e;

  typedef enum logic {
    SBOX_STANDARD = 1'b0,
    SBOX_MODIFIED = 1'b1
  } sbox_sel_e;

  // Entry i of the table is t[i].
  typedef logic [255:0][7:0] sbox_table_t;

  // Number of key words and rounds for a key length.
  function automatic logic [3:0] nk_of(key_len_e kl);
    case (kl)
      KEY_192: return 4'd6;
      KEY_256: return 4'd8;
      default: return 4'd4;
    endcase
  endfunction

  function automatic logic [3:0] nr_of(key_len_e kl);
    return nk_of(kl) + 4'd6;
  endfunction

  // Multiply by {02} in the AES field.
  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // Shift-and-add product in GF(2^8) modulo x^8 + red (red: the polynomial's
  // terms below x^8).
  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b, logic [7:0] red);
    logic [7:0] acc;
    logic [7:0] m;
    acc = '0;
    m   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= m;
      m = {m[6:0], 1'b0} ^ (m[7] ? red : 8'h00);
    end
    return acc;
  endfunction

  // Inverse as a^254 (a^(2^8-2)); 00 maps to 00.
  function automatic logic [7:0] gf_inv(logic [7:0] a, logic [7:0] red);
    logic [7:0] r;
    logic [7:0] sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq, red);  // 254 = 0b11111110
      sq = gf_mul(sq, sq, red);
    end
    return r;
  endfunction

  function automatic sbox_table_t std_sbox_table();
    sbox_table_t t;
    logic [7:0]  b;
    logic [7:0]  y;
    for (int x = 0; x < 256; x++) begin
      b = gf_inv(8'(x), AES_POLY[7:0]);
      for (int j = 0; j < 8; j++)
        y[j] = b[j] ^ b[(j + 4) % 8] ^ b[(j + 5) % 8] ^ b[(j + 6) % 8]
             ^ b[(j + 7) % 8] ^ 1'((8'h63 >> j) & 8'h01);
      t[x] = y;
    end
    return t;
  endfunction

  function automatic sbox_table_t mod_sbox_table(logic [7:0] red, int g);
    sbox_table_t t;
    int          p;
    p = 1;                        // g^0
    for (int x = 0; x < 256; x++) begin
      t[x] = gf_inv((p == 256) ? 8'h00 : 8'(p), red);
      p    = (p * g) % 257;
    end
    return t;
  endfunction

endpackage
