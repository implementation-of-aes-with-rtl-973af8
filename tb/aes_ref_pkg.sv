// aes_ref_pkg: byte-level reference model of the cipher for the testbenches.
//
// Written independently of the RTL: field inverses are found by exhaustive
// search, 3^x mod 257 by repeated multiplication, and the cipher works on a
// 4x4 byte matrix s[row][col] following the textbook description. Tables
// are filled at run time by build_tables().
package aes_ref_pkg;

  int unsigned std_tab [256];
  int unsigned mod_tab [256];
  int unsigned poly_used;

  function automatic int unsigned fmul(int unsigned a, int unsigned b, int unsigned poly);
    int unsigned r = 0;
    for (int i = 0; i < 8; i++) begin
      if (((b >> i) & 1) != 0) r ^= a;
      a = a << 1;
      if ((a & 'h100) != 0) a ^= poly;
    end
    return r & 'hFF;
  endfunction

  function automatic int unsigned finv(int unsigned a, int unsigned poly);
    if (a == 0) return 0;
    for (int unsigned x = 1; x < 256; x++)
      if (fmul(a, x, poly) == 1) return x;
    return 0;
  endfunction

  function automatic void build_tables(int unsigned mod_poly);
    int unsigned b, y, p;
    poly_used = mod_poly;
    for (int x = 0; x < 256; x++) begin
      b = finv(x, 'h11B);
      y = 0;
      for (int j = 0; j < 8; j++)
        y |= (((b >> j) ^ (b >> ((j+4)%8)) ^ (b >> ((j+5)%8)) ^ (b >> ((j+6)%8))
             ^ (b >> ((j+7)%8)) ^ ('h63 >> j)) & 1) << j;
      std_tab[x] = y;
      p = 1;
      for (int k = 0; k < x; k++) p = (p * 3) % 257;
      mod_tab[x] = finv((p == 256) ? 0 : p, mod_poly);
    end
  endfunction

  function automatic int unsigned sb(int unsigned x, bit modified);
    return modified ? mod_tab[x & 'hFF] : std_tab[x & 'hFF];
  endfunction

  typedef int unsigned mat_t [4][4];

  function automatic mat_t to_mat(logic [127:0] v);
    mat_t m;
    for (int n = 0; n < 16; n++) m[n%4][n/4] = 32'(v[127-8*n -: 8]);
    return m;
  endfunction

  function automatic logic [127:0] from_mat(mat_t m);
    logic [127:0] v;
    for (int n = 0; n < 16; n++) v[127-8*n -: 8] = 8'(m[n%4][n/4]);
    return v;
  endfunction

  function automatic logic [127:0] ref_sub(logic [127:0] v, bit modified);
    mat_t m = to_mat(v);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) m[r][c] = sb(m[r][c], modified);
    return from_mat(m);
  endfunction

  function automatic logic [127:0] ref_shift(logic [127:0] v);
    mat_t m = to_mat(v), o;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) o[r][c] = m[r][(c+r)%4];
    return from_mat(o);
  endfunction

  function automatic logic [127:0] ref_mix(logic [127:0] v);
    mat_t m = to_mat(v), o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[r][c] = fmul(m[r][c], 2, 'h11B) ^ fmul(m[(r+1)%4][c], 3, 'h11B)
                ^ m[(r+2)%4][c] ^ m[(r+3)%4][c];
    return from_mat(o);
  endfunction

  function automatic logic [127:0] ref_round(logic [127:0] v, logic [127:0] k, bit fin, bit modified);
    logic [127:0] t = ref_shift(ref_sub(v, modified));
    if (!fin) t = ref_mix(t);
    return t ^ k;
  endfunction

  // Full key schedule, w[i] for i < 4*(nk+7).
  typedef logic [31:0] sched_t [60];

  function automatic sched_t ref_schedule(logic [255:0] key, int nk, bit modified);
    sched_t w;
    logic [31:0] t;
    int unsigned rc = 1;
    for (int i = 0; i < 60; i++) w[i] = '0;
    for (int i = 0; i < nk; i++) w[i] = key[255-32*i -: 32];
    for (int i = nk; i < 4*(nk+7); i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        for (int b = 0; b < 4; b++) t[31-8*b -: 8] = 8'(sb(t[31-8*b -: 8], modified));
        t[31:24] ^= 8'(rc);
        rc = fmul(rc, 2, 'h11B);
      end else if (nk == 8 && i % nk == 4) begin
        for (int b = 0; b < 4; b++) t[31-8*b -: 8] = 8'(sb(t[31-8*b -: 8], modified));
      end
      w[i] = w[i-nk] ^ t;
    end
    return w;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [255:0] key, int nk, bit modified);
    sched_t w = ref_schedule(key, nk, modified);
    int nr = nk + 6;
    logic [127:0] s = pt ^ {w[0], w[1], w[2], w[3]};
    for (int r = 1; r <= nr; r++)
      s = ref_round(s, {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]}, r == nr, modified);
    return s;
  endfunction

endpackage
