// tb_aes_mix_columns: MixColumns on published test columns, a FIPS-197
// round vector and random States, against the reference product with
// a(x) = {03}x^3 + {01}x^2 + {01}x + {02}.
module tb_aes_mix_columns;
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

  aes_mix_columns dut (.state_i(s_in), .state_o(s_out));

  initial begin
    s_in = 128'hdb135345f20a225c01010101c6c6c6c6; #1;
    check("test columns", s_out, 128'h8e4da1bc9fdc589d01010101c6c6c6c6);
    s_in = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1;
    check("FIPS-197 C.1 round 1 m_col", s_out, 128'h046681e5e0cb199a48f8d37a2806264c);
    for (int t = 0; t < 200; t++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom}; #1;
      check("random", s_out, ref_mix(s_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
