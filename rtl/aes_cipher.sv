// aes_cipher: AES encryption core with a selectable S-box, the modified
// S-box by default.
//
// A key (128, 192 or 256 bits, left aligned in `key`, length on `key_len`)
// is loaded with a key_valid/key_ready handshake; aes_key_expansion then
// builds and stores the whole key schedule (40/46/52 clocks). The schedule
// stays valid for any number of blocks until the next key is loaded.
//
// A plaintext block is accepted with in_valid/in_ready. In the accepting
// clock the initial AddRoundKey (round key 0) is applied and the result
// registered; each following clock runs one complete round through
// aes_round (SubBytes, ShiftRows, MixColumns, AddRoundKey), the Nr-th and
// last round without MixColumns. out_valid pulses for one clock when the
// ciphertext is in out_data, which then holds it until the next block is
// accepted. Latency is Nr clocks from the accepting edge to out_valid
// (10/12/14) and a new block can be accepted in the out_valid clock, so a
// block takes Nr+1 clocks.
//
// key_ready is high when neither a key expansion nor a block is in
// progress; in_ready additionally needs a loaded key and yields to
// key_valid, so a key offered together with a block is taken first.
// Reset is asynchronous, active low; after reset no key is loaded.
// The round-per-clock structure and the handshakes are this design's own
// choice; the transformations and the key schedule follow AES.
module aes_cipher #(
  parameter aes_pkg::sbox_sel_e SBOX_SEL   = aes_pkg::SBOX_MODIFIED,
  parameter logic [8:0]         FIELD_POLY = aes_pkg::MOD_SBOX_POLY
) (
  input  logic              clk,
  input  logic              rst_n,
  // key load
  input  logic              key_valid,
  output logic              key_ready,
  input  logic [255:0]      key,
  input  aes_pkg::key_len_e key_len,
  // plaintext in
  input  logic              in_valid,
  output logic              in_ready,
  input  aes_pkg::state_t   in_data,
  // ciphertext out
  output logic              out_valid,
  output aes_pkg::state_t   out_data
);
  import aes_pkg::*;

  logic       kx_busy, kx_done, kx_start;
  logic [3:0] nr;
  logic [3:0] rd_round;
  round_key_t rk;

  logic       enc_busy;
  logic       key_loaded;
  logic [3:0] round_q;
  logic       last_round;
  logic       accept;
  state_t     state_q, round_out;

  assign key_ready  = !kx_busy && !enc_busy;
  assign kx_start   = key_valid && key_ready;
  assign in_ready   = key_loaded && !kx_busy && !enc_busy && !key_valid;
  assign accept     = in_valid && in_ready;
  assign last_round = (round_q == nr);
  assign rd_round   = enc_busy ? round_q : 4'd0;

  aes_key_expansion #(.SBOX_SEL(SBOX_SEL), .FIELD_POLY(FIELD_POLY)) u_key_exp (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (kx_start),
    .key      (key),
    .key_len  (key_len),
    .busy     (kx_busy),
    .done     (kx_done),
    .nr       (nr),
    .rd_round (rd_round),
    .rd_key   (rk)
  );

  aes_round #(.SBOX_SEL(SBOX_SEL), .FIELD_POLY(FIELD_POLY)) u_round (
    .state_i     (state_q),
    .round_key   (rk),
    .final_round (last_round),
    .state_o     (round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_busy   <= 1'b0;
      key_loaded <= 1'b0;
      round_q    <= '0;
      out_valid  <= 1'b0;
      state_q    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (kx_start) key_loaded <= 1'b0;
      if (kx_done)  key_loaded <= 1'b1;
      if (accept) begin
        state_q  <= in_data ^ rk;          // round 0: AddRoundKey only
        round_q  <= 4'd1;
        enc_busy <= 1'b1;
      end else if (enc_busy) begin
        state_q <= round_out;
        round_q <= round_q + 4'd1;
        if (last_round) begin
          enc_busy  <= 1'b0;
          out_valid <= 1'b1;
        end
      end
    end
  end

  assign out_data = state_q;

  // A key expansion and a block are never in progress together, and a
  // block never runs past its last round. Their disable iff samples rst_n
  // synchronously, which lint reports as SYNCASYNCNET; that is intended.
  a_exclusive : assert property (@(posedge clk) disable iff (!rst_n) !(kx_busy && enc_busy));
  a_round_max : assert property (@(posedge clk) disable iff (!rst_n) enc_busy |-> round_q <= nr);
  a_loaded    : assert property (@(posedge clk) disable iff (!rst_n) accept |-> key_loaded);

endmodule
