// tb_aes_sbox_std: exhaustive check of the standard S-box against the
// reference model (inverse found by search, then the affine map), plus
// published FIPS-197 entries and a permutation check.
module tb_aes_sbox_std;
  import aes_ref_pkg::*;
  logic [7:0] a, y;
  int checks = 0, failures = 0;
  bit seen [256];

  aes_sbox_std dut (.a(a), .y(y));

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
      a = 8'(x); #1;
      check($sformatf("S[%02h]", x), int'(y), std_tab[x]);
      seen[y] = 1'b1;
    end
    // FIPS-197 Figure 7 entries
    a = 8'h00; #1; check("S[00]", int'(y), 'h63);
    a = 8'h01; #1; check("S[01]", int'(y), 'h7C);
    a = 8'h53; #1; check("S[53]", int'(y), 'hED);
    a = 8'hFF; #1; check("S[ff]", int'(y), 'h16);
    a = 8'h9A; #1; check("S[9a]", int'(y), 'hB8);
    for (int v = 0; v < 256; v++) check($sformatf("value %02h reached", v), int'(seen[v]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
