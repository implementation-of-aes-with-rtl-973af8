// tb_aes_key_expansion: expands 128-, 192- and 256-bit keys with the
// default (modified) S-box and with the standard S-box. Every round key is
// compared with the reference schedule; the standard-S-box schedules are
// also checked against the FIPS-197 Appendix A words. The expansion time
// (Nb(Nr+1)-Nk clocks from start to done) and the round count are checked,
// and a start pulse during an expansion must be ignored.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;
  import aes_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [255:0] key;
  key_len_e     key_len;
  logic         busy_m, done_m, busy_s, done_s;
  logic [3:0]   nr_m, nr_s, rd_round;
  logic [127:0] rk_m, rk_s;
  int checks = 0, failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  aes_key_expansion dut (.clk, .rst_n, .start, .key, .key_len, .busy(busy_m), .done(done_m),
                         .nr(nr_m), .rd_round, .rd_key(rk_m));
  aes_key_expansion #(.SBOX_SEL(SBOX_STANDARD)) dut_std (.clk, .rst_n, .start, .key, .key_len,
                         .busy(busy_s), .done(done_s), .nr(nr_s), .rd_round, .rd_key(rk_s));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expand(logic [255:0] k, key_len_e kl, int nk, bit second_start);
    int t0;
    sched_t wm, ws;
    wm = ref_schedule(k, nk, 1'b1);
    ws = ref_schedule(k, nk, 1'b0);
    @(negedge clk);
    key = k; key_len = kl; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cycles;
    if (second_start) begin
      // a start while busy must not restart the expansion
      repeat (3) @(negedge clk);
      key = ~k; key_len = KEY_128; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
    end
    check("busy during expansion", {127'b0, busy_m}, 1);
    while (!done_m) @(negedge clk);
    check_int($sformatf("Nk=%0d expansion clocks", nk), cycles - t0, 4 * (nk + 7) - nk);
    check("standard done together", {127'b0, done_s}, 1);
    check_int("nr", int'(nr_m), nk + 6);
    check_int("nr std", int'(nr_s), nk + 6);
    @(negedge clk);
    check("busy cleared", {126'b0, busy_m, busy_s}, 0);
    for (int r = 0; r <= nk + 6; r++) begin
      rd_round = 4'(r); #1;
      check($sformatf("Nk=%0d modified rk[%0d]", nk, r), rk_m, {wm[4*r], wm[4*r+1], wm[4*r+2], wm[4*r+3]});
      check($sformatf("Nk=%0d standard rk[%0d]", nk, r), rk_s, {ws[4*r], ws[4*r+1], ws[4*r+2], ws[4*r+3]});
    end
  endtask

  initial begin
    build_tables('h163);
    rd_round = '0; key = '0; key_len = KEY_128;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    expand({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, KEY_128, 4, 1'b0);
    rd_round = 4'd1;  #1 check("FIPS A.1 w[4..7]",   rk_s, 128'ha0fafe1788542cb123a339392a6c7605);
    rd_round = 4'd10; #1 check("FIPS A.1 w[40..43]", rk_s, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);

    expand({192'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, 64'h0}, KEY_192, 6, 1'b1);
    rd_round = 4'd1;  #1 check("FIPS A.2 w[4..7]",   rk_s, 128'h62f8ead2522c6b7bfe0c91f72402f5a5);
    rd_round = 4'd12; #1;
    checks++; if (rk_s[31:0] !== 32'h01002202) begin failures++; $display("FAIL FIPS A.2 w[51]: %08h", rk_s[31:0]); end

    expand(256'h603deb1015ca71be2b73aeb0857d77811f352c073b6108d72d9810a30914dff4, KEY_256, 8, 1'b0);
    rd_round = 4'd2; #1;
    checks++; if (rk_s[127:96] !== 32'h9ba35411) begin failures++; $display("FAIL FIPS A.3 w[8]: %08h", rk_s[127:96]); end

    for (int t = 0; t < 6; t++)
      expand({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom},
             key_len_e'(t % 3), 4 + 2 * (t % 3), t == 4);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
