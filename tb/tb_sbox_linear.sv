// tb_sbox_linear: linear-approximation analysis of the two S-boxes.
//
// All 256 inputs are applied to the standard and the modified S-box and the
// outputs captured. For the two approximations used to compare them,
//   standard: X7 ^ Y2 ^ Y3 ^ Y4 ^ Y5 = 0
//   modified: X7 ^ Y1 ^ Y3 ^ Y4 ^ Y5 = 0   (Y6 appears twice and cancels)
// (bit 0 = least significant) the number of inputs for which they hold is
// counted and compared with the reference model. Then every non-zero
// input/output mask pair is scanned for the largest |count - 128|, the
// best linear bias; for the AES S-box this is known to be 16 (bias 2^-4),
// for the modified S-box an independent software model gives 36.
module tb_sbox_linear;
  import aes_ref_pkg::*;

  logic [7:0] a, y_std, y_mod;
  logic [7:0] t_std [256];
  logic [7:0] t_mod [256];
  int checks = 0, failures = 0;

  aes_sbox_std u_std (.a(a), .y(y_std));
  aes_sbox_mod u_mod (.a(a), .y(y_mod));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int holds(logic [7:0] t [256], logic [7:0] in_mask, logic [7:0] out_mask);
    int n = 0;
    for (int x = 0; x < 256; x++)
      if (($countones(8'(x) & in_mask) + $countones(t[x] & out_mask)) % 2 == 0) n++;
    return n;
  endfunction

  function automatic int max_bias(logic [7:0] t [256]);
    int best = 0, d;
    for (int im = 1; im < 256; im++)
      for (int om = 1; om < 256; om++) begin
        d = holds(t, 8'(im), 8'(om)) - 128;
        if (d < 0) d = -d;
        if (d > best) best = d;
      end
    return best;
  endfunction

  int n_std, n_mod, r_std, r_mod, b_std, b_mod;

  initial begin
    build_tables('h163);
    for (int x = 0; x < 256; x++) begin
      a = 8'(x); #1;
      t_std[x] = y_std;
      t_mod[x] = y_mod;
    end
    n_std = holds(t_std, 8'h80, 8'h3C);
    n_mod = holds(t_mod, 8'h80, 8'h3A);
    r_std = 0; r_mod = 0;
    for (int x = 0; x < 256; x++) begin
      if ((((x >> 7) ^ (std_tab[x] >> 2) ^ (std_tab[x] >> 3) ^ (std_tab[x] >> 4) ^ (std_tab[x] >> 5)) & 1) == 0) r_std++;
      if ((((x >> 7) ^ (mod_tab[x] >> 1) ^ (mod_tab[x] >> 3) ^ (mod_tab[x] >> 4) ^ (mod_tab[x] >> 5)
           ^ (mod_tab[x] >> 6) ^ (mod_tab[x] >> 6)) & 1) == 0) r_mod++;
    end
    checks += 2;
    if (n_std != r_std) begin failures++; $display("FAIL standard count %0d, expected %0d", n_std, r_std); end
    if (n_mod != r_mod) begin failures++; $display("FAIL modified count %0d, expected %0d", n_mod, r_mod); end
    b_std = max_bias(t_std);
    b_mod = max_bias(t_mod);
    checks += 2;
    // 36 for the modified S-box was found with an independent software model.
    if (b_mod != 36) begin failures++; $display("FAIL modified best |count-128| %0d, expected 36", b_mod); end
    if (b_std != 16) begin failures++; $display("FAIL standard best |count-128| %0d, expected 16", b_std); end
    $display("standard: approximation holds for %0d of 256, best |count-128| = %0d", n_std, b_std);
    $display("modified: approximation holds for %0d of 256, best |count-128| = %0d", n_mod, b_mod);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
