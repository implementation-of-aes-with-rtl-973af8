// tb_aes_sub_bytes: SubBytes with the default (modified) S-box and with the
// standard one, on random States and on a FIPS-197 round-1 vector, compared
// byte by byte with the reference tables.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] s_in, s_mod, s_std;
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

  aes_sub_bytes dut (.state_i(s_in), .state_o(s_mod));
  aes_sub_bytes #(.SBOX_SEL(aes_pkg::SBOX_STANDARD)) dut_std (.state_i(s_in), .state_o(s_std));

  initial begin
    build_tables('h163);
    s_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    check("FIPS-197 C.1 round 1 s_box", s_std, 128'hd42711aee0bf98f1b8b45de51e415230);
    for (int t = 0; t < 200; t++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom}; #1;
      check("modified", s_mod, ref_sub(s_in, 1'b1));
      check("standard", s_std, ref_sub(s_in, 1'b0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
