// tb_aes_round: one full round and one final round (no MixColumns), with
// the default modified S-box and with the standard S-box on FIPS-197
// round vectors, against the reference round.
module tb_aes_round;
  import aes_ref_pkg::*;
  logic [127:0] s_in, k, s_mod, s_std;
  logic         fin;
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

  aes_round dut (.state_i(s_in), .round_key(k), .final_round(fin), .state_o(s_mod));
  aes_round #(.SBOX_SEL(aes_pkg::SBOX_STANDARD)) dut_std (
    .state_i(s_in), .round_key(k), .final_round(fin), .state_o(s_std));

  initial begin
    build_tables('h163);
    // FIPS-197 Appendix B, round 1 and round 10
    s_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    k    = 128'ha0fafe1788542cb123a339392a6c7605; fin = 1'b0; #1;
    check("FIPS-197 B round 1", s_std, 128'ha49c7ff2689f352b6b5bea43026a5049);
    s_in = 128'heb40f21e592e38848ba113e71bc342d2;
    k    = 128'hd014f9a8c9ee2589e13f0cc8b6630ca6; fin = 1'b1; #1;
    check("FIPS-197 B round 10", s_std, 128'h3925841d02dc09fbdc118597196a0b32);
    for (int t = 0; t < 200; t++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom};
      k    = {$urandom, $urandom, $urandom, $urandom};
      fin  = 1'(t % 2); #1;
      check(fin ? "modified final" : "modified", s_mod, ref_round(s_in, k, fin, 1'b1));
      check(fin ? "standard final" : "standard", s_std, ref_round(s_in, k, fin, 1'b0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
