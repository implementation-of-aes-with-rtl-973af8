// tb_aes_cipher_std: the encryption core built with the standard AES S-box
// (SBOX_SEL = SBOX_STANDARD) must reproduce the FIPS-197 Appendix C
// known-answer vectors for 128-, 192- and 256-bit keys; a few random
// blocks per key length are also scored against the reference model.
module tb_aes_cipher_std;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         key_valid = 1'b0, key_ready;
  logic [255:0] key = '0;
  key_len_e     key_len = KEY_128;
  logic         in_valid = 1'b0, in_ready;
  logic [127:0] in_data = '0;
  logic         out_valid;
  logic [127:0] out_data;

  aes_cipher #(.SBOX_SEL(SBOX_STANDARD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(logic [127:0] pt, output logic [127:0] ct);
    @(negedge clk);
    in_valid = 1'b1; in_data = pt;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 1'b0;
    while (!out_valid) @(negedge clk);
    ct = out_data;
  endtask

  task automatic load(logic [255:0] k, key_len_e kl);
    @(negedge clk);
    key = k; key_len = kl; key_valid = 1'b1;
    #1;
    while (!key_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    key_valid = 1'b0;
  endtask

  localparam logic [127:0] PT = 128'h00112233445566778899aabbccddeeff;
  localparam logic [255:0] K  = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
  logic [127:0] ct, pt;
  logic [255:0] rk;

  initial begin
    build_tables('h163);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load(K, KEY_128); encrypt(PT, ct); check("FIPS-197 C.1", ct, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    load(K, KEY_192); encrypt(PT, ct); check("FIPS-197 C.2", ct, 128'hdda97ca4864cdfe06eaf70a0ec0d7191);
    load(K, KEY_256); encrypt(PT, ct); check("FIPS-197 C.3", ct, 128'h8ea2b7ca516745bfeafc49904b496089);
    load({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, KEY_128);
    encrypt(128'h3243f6a8885a308d313198a2e0370734, ct);
    check("FIPS-197 B", ct, 128'h3925841d02dc09fbdc118597196a0b32);
    for (int l = 0; l < 3; l++) begin
      rk = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      load(rk, key_len_e'(l));
      for (int b = 0; b < 4; b++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        encrypt(pt, ct);
        check($sformatf("random Nk=%0d", 4 + 2 * l), ct, ref_encrypt(pt, rk, 4 + 2 * l, 1'b0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
