// tb_aes_sbox_mod: exhaustive check of the modified S-box (x -> 3^x mod 257,
// then inverse in GF(2^8)) against the reference model, for the default
// field x^8+x^6+x^5+x+1 and for the AES field. Also checks the worked
// example {32} -> 3^50 mod 257 = {12} -> inverse, the {80} -> 256 -> {00}
// case and that the map is a permutation.
module tb_aes_sbox_mod;
  import aes_ref_pkg::*;
  logic [7:0] a, y, y_aes;
  int checks = 0, failures = 0;
  bit seen [256];
  int unsigned aes_tab [256];
  int unsigned p;

  aes_sbox_mod dut (.a(a), .y(y));
  aes_sbox_mod #(.FIELD_POLY(9'h11B)) dut_aes (.a(a), .y(y_aes));

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_tables('h163);
    for (int x = 0; x < 256; x++) begin
      p = 1;
      for (int k = 0; k < x; k++) p = (p * 3) % 257;
      aes_tab[x] = finv((p == 256) ? 0 : p, 'h11B);
    end
    for (int x = 0; x < 256; x++) begin
      a = 8'(x); #1;
      check($sformatf("S'[%02h]", x), int'(y), mod_tab[x]);
      check($sformatf("S'aes[%02h]", x), int'(y_aes), aes_tab[x]);
      seen[y] = 1'b1;
    end
    a = 8'h32; #1; check("S'[32] = inv({12})", int'(y), finv('h12, 'h163));
    check("S'[32] value", int'(y), 'hE3);
    check("S'aes[32] value", int'(y_aes), 'hAA);
    a = 8'h80; #1; check("S'[80] (3^128 = 256 -> 00)", int'(y), 'h00);
    a = 8'h00; #1; check("S'[00] = inv(1)", int'(y), 'h01);
    a = 8'h01; #1; check("S'[01] = inv(3)", int'(y), 'hDE);
    for (int v = 0; v < 256; v++) check($sformatf("value %02h reached", v), int'(seen[v]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
