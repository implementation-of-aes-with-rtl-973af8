// aes_key_expansion: Key Expansion for 128-, 192- and 256-bit keys.
//
// On start (accepted only while not busy) the Nk words of the key are
// written as w[0..Nk-1] and the remaining Nb(Nr+1)-Nk schedule words are
// produced one per clock, as in FIPS-197:
//   temp = w[i-1]
//   if i mod Nk == 0          : temp = SubWord(RotWord(temp)) ^ {Rcon, 24'h0}
//   else if Nk == 8, i mod 8 == 4: temp = SubWord(temp)
//   w[i] = w[i-Nk] ^ temp
// SubWord uses the same S-box as the cipher's SubBytes (SBOX_SEL); Rcon
// starts at {01} and is doubled in the AES field after each use. The last
// eight words are kept in a sliding window so w[i-1] and w[i-Nk] need no
// wide multiplexer; every word is also stored in the schedule, organised as
// Nr+1 round keys of four words.
//
// Timing: expansion takes 40, 46 or 52 clocks for Nk = 4, 6, 8; done pulses
// in the clock after the last word is written, and busy is high from the
// clock after start until then. rd_key is a combinational read of round key
// rd_round (words w[4r..4r+3], w[4r] in bits 127:96); the schedule is only
// valid once done has pulsed. The key is left aligned in the 256-bit port.
// Reset is asynchronous, active low, and clears the control state only.
module aes_key_expansion #(
  parameter aes_pkg::sbox_sel_e SBOX_SEL   = aes_pkg::SBOX_MODIFIED,
  parameter logic [8:0]         FIELD_POLY = aes_pkg::MOD_SBOX_POLY,
  parameter int                 MAX_WORDS  = aes_pkg::MAX_WORDS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [255:0]       key,
  input  aes_pkg::key_len_e  key_len,
  output logic               busy,
  output logic               done,
  output logic [3:0]         nr,
  input  logic [3:0]         rd_round,
  output aes_pkg::round_key_t rd_key
);
  import aes_pkg::*;

  localparam int NRK = MAX_WORDS / NB;  // round keys stored

  round_key_t       sched [NRK];
  word_t            win   [MAX_NK];      // win[0] = w[i-1], win[k] = w[i-1-k]
  logic [5:0]       idx;                 // index i of the word being produced
  logic [3:0]       nk_q;
  logic [3:0]       nr_q;
  logic [3:0]       phase;               // i mod Nk
  logic [7:0]       rcon;
  logic [5:0]       last_idx;

  word_t            sb_in, sb_out, temp, w_old, w_new;

  // SubWord: four S-boxes on the (possibly rotated) previous word.
  assign sb_in = (phase == 4'd0) ? {win[0][23:0], win[0][31:24]} : win[0];
  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox #(.SBOX_SEL(SBOX_SEL), .FIELD_POLY(FIELD_POLY)) u_sbox (
      .a(sb_in[31-8*b -: 8]), .y(sb_out[31-8*b -: 8]));
  end

  always_comb begin
    if (phase == 4'd0)                     temp = sb_out ^ {rcon, 24'h0};
    else if (nk_q == 4'd8 && phase == 4'd4) temp = sb_out;
    else                                   temp = win[0];
    case (nk_q)
      4'd6:    w_old = win[5];
      4'd8:    w_old = win[7];
      default: w_old = win[3];
    endcase
    w_new = w_old ^ temp;
  end

  assign last_idx = 6'(NB * (32'(nr_q) + 1) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      idx   <= '0;
      nk_q  <= 4'd4;
      nr_q  <= 4'd10;
      phase <= '0;
      rcon  <= 8'h01;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        busy  <= 1'b1;
        idx   <= 6'(nk_of(key_len));
        nk_q  <= nk_of(key_len);
        nr_q  <= nr_of(key_len);
        phase <= '0;
        rcon  <= 8'h01;
      end else if (busy) begin
        idx   <= idx + 6'd1;
        phase <= (phase == nk_q - 4'd1) ? 4'd0 : phase + 4'd1;
        if (phase == 4'd0) rcon <= xtime(rcon);
        if (idx == last_idx) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Schedule storage and the sliding window (data only, not reset).
  always_ff @(posedge clk) begin
    if (!busy && start) begin
      for (int i = 0; i < MAX_NK; i++) begin
        if (i < int'(nk_of(key_len))) begin
          sched[i/4][127-32*(i%4) -: 32] <= key[255-32*i -: 32];
          win[int'(nk_of(key_len)) - 1 - i] <= key[255-32*i -: 32];
        end
      end
    end else if (busy) begin
      sched[idx[5:2]][127-32*int'(idx[1:0]) -: 32] <= w_new;
      win[0] <= w_new;
      for (int k = 1; k < MAX_NK; k++) win[k] <= win[k-1];
    end
  end

  assign nr     = nr_q;
  assign rd_key = (int'(rd_round) < NRK) ? sched[rd_round] : '0;

endmodule
