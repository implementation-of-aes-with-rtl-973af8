// tb_aes_shift_rows: ShiftRows on a FIPS-197 vector and on random States,
// against the reference s'(r,c) = s(r,(c+r) mod 4).
module tb_aes_shift_rows;
  import aes_ref_pkg::*;
  logic [127:0] s_in, s_out;
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

  aes_shift_rows dut (.state_i(s_in), .state_o(s_out));

  initial begin
    s_in = 128'hd42711aee0bf98f1b8b45de51e415230; #1;
    check("FIPS-197 C.1 round 1 s_row", s_out, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    s_in = 128'h000102030405060708090a0b0c0d0e0f; #1;
    check("byte positions", s_out, 128'h00050a0f04090e03080d02070c01060b);
    for (int t = 0; t < 200; t++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom}; #1;
      check("random", s_out, ref_shift(s_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
