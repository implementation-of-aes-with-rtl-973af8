// tb_aes_add_round_key: AddRoundKey on the FIPS-197 round-0 vector and on
// random State/key pairs, checked column by column against w[c] added to
// column c.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] s_in, k, s_out, exp;
  int checks = 0, failures = 0;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  aes_add_round_key dut (.state_i(s_in), .round_key(k), .state_o(s_out));

  initial begin
    s_in = 128'h3243f6a8885a308d313198a2e0370734;
    k    = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    check("FIPS-197 B round 0", s_out, 128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int t = 0; t < 200; t++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom};
      k    = {$urandom, $urandom, $urandom, $urandom}; #1;
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          exp[127-8*(4*c+r) -: 8] = s_in[127-8*(4*c+r) -: 8] ^ k[127-32*c-8*r -: 8];
      check("random", s_out, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
