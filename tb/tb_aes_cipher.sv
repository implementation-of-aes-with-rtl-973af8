// tb_aes_cipher: end-to-end test of the encryption core at its default
// parameters (modified S-box, field x^8+x^6+x^5+x+1).
//
// For each key length (128, 192, 256) a key is loaded and blocks are
// encrypted: a fixed vector whose ciphertext was computed offline, then
// streams of random blocks, some offered back to back and some with gaps,
// all scored against the byte-level reference model. Checked too: key-load
// time (Nb(Nr+1)-Nk expansion clocks plus one), block latency (Nr clocks
// from the accepting edge to out_valid) and that a new block is taken in
// the out_valid clock. Counted mechanisms, each of which must occur:
// key loads of each length, blocks of each length, final rounds, back-to-back
// acceptance, stalls (in_valid held while the core is busy), a key offered
// together with a block (key wins) and a key reload after blocks.
module tb_aes_cipher;
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

  aes_cipher dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // scoreboard
  logic [127:0] exp_q [$];
  int           acc_q [$];
  int           nr_q  [$];
  logic [255:0] cur_key;
  int           cur_nk;

  // mechanism counters
  int n_key_len [3];
  int n_blk_len [3];
  int n_final, n_b2b, n_stall, n_key_prio, n_reload;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor (negedge: out_valid and out_data are registered).
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_q.size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected out_valid");
      end else begin
        logic [127:0] e;
        int a, n;
        e = exp_q.pop_front(); a = acc_q.pop_front(); n = nr_q.pop_front();
        check("ciphertext", out_data, e);
        check_int("latency", cyc - a - 1, n);
        n_final++;
        n_blk_len[(n - 10) / 2]++;
      end
    end
  end

  // Load a key; optionally offer a block in the same clock.
  task automatic load_key(logic [255:0] k, key_len_e kl, bit with_block);
    int t0, nk;
    nk = 4 + 2 * int'(kl);
    @(negedge clk);
    if (exp_q.size() != 0 || n_final != 0) n_reload++;
    key = k; key_len = kl; key_valid = 1'b1;
    if (with_block) begin in_valid = 1'b1; in_data = {$urandom, $urandom, $urandom, $urandom}; end
    #1;
    while (!key_ready) begin
      if (in_valid && !in_ready) n_stall++;
      @(negedge clk); #1;
    end
    if (with_block) begin
      n_key_prio++;
      check("in_ready low while key offered", {127'b0, in_ready}, 0);
    end
    t0 = cyc;
    @(negedge clk);
    key_valid = 1'b0;
    in_valid  = 1'b0;
    cur_key = k; cur_nk = nk;
    n_key_len[int'(kl)]++;
    #1;
    while (!in_ready) @(negedge clk);
    check_int($sformatf("key load time Nk=%0d", nk), cyc - t0 - 1, 4 * (nk + 7) - nk + 1);
  endtask

  // Offer one block and hold it until accepted.
  task automatic send(logic [127:0] pt);
    @(negedge clk);
    in_valid = 1'b1; in_data = pt;
    #1;
    while (!in_ready) begin
      n_stall++;
      @(negedge clk); #1;
    end
    if (out_valid) n_b2b++;
    exp_q.push_back(ref_encrypt(pt, cur_key, cur_nk, 1'b1));
    acc_q.push_back(cyc);
    nr_q.push_back(cur_nk + 6);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(negedge clk);
  endtask

  localparam logic [127:0] PT = 128'h00112233445566778899aabbccddeeff;
  localparam logic [255:0] K  = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
  // Ciphertexts of PT under K (first Nk words) with the modified S-box,
  // computed offline with an independent model.
  localparam logic [127:0] CT128 = 128'haf1ea55894487831a1ae240bdb6c288f;
  localparam logic [127:0] CT192 = 128'haf583083b663010dbdecc927bc8e14ba;
  localparam logic [127:0] CT256 = 128'h0bb47960a74abc25ad6f3a82f1b5df13;

  initial begin
    build_tables('h163);
    check("reference model, 128", ref_encrypt(PT, K, 4, 1'b1), CT128);
    check("reference model, 192", ref_encrypt(PT, K, 6, 1'b1), CT192);
    check("reference model, 256", ref_encrypt(PT, K, 8, 1'b1), CT256);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("no key after reset", {127'b0, in_ready}, 0);

    for (int l = 0; l < 3; l++) begin
      load_key(K, key_len_e'(l), l == 2);
      drain();
      send(PT);
      drain();
      // back-to-back stream: the next block waits with in_valid high
      for (int b = 0; b < 8; b++) send({$urandom, $urandom, $urandom, $urandom});
      drain();
      // random key, blocks with random gaps
      load_key({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom},
               key_len_e'(l), 1'b0);
      for (int b = 0; b < 6; b++) begin
        repeat ($urandom_range(0, 15)) @(negedge clk);
        send({$urandom, $urandom, $urandom, $urandom});
      end
      drain();
    end
    repeat (2) @(negedge clk);

    if (n_key_len[0] == 0 || n_key_len[1] == 0 || n_key_len[2] == 0) begin failures++; $display("FAIL a key length never loaded"); end
    if (n_blk_len[0] == 0 || n_blk_len[1] == 0 || n_blk_len[2] == 0) begin failures++; $display("FAIL a key length never encrypted"); end
    if (n_final == 0)    begin failures++; $display("FAIL no final round"); end
    if (n_b2b == 0)      begin failures++; $display("FAIL no back-to-back block"); end
    if (n_stall == 0)    begin failures++; $display("FAIL no stall"); end
    if (n_key_prio == 0) begin failures++; $display("FAIL key never offered with a block"); end
    if (n_reload == 0)   begin failures++; $display("FAIL no key reload"); end
    checks += 7;
    $display("key loads 128/192/256: %0d/%0d/%0d, blocks: %0d/%0d/%0d, final rounds %0d, back-to-back %0d, stall clocks %0d, key-with-block %0d, reloads %0d",
             n_key_len[0], n_key_len[1], n_key_len[2], n_blk_len[0], n_blk_len[1], n_blk_len[2],
             n_final, n_b2b, n_stall, n_key_prio, n_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
