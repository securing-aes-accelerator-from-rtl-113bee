// aes_round: one pipelined round of masked AES-128. The state goes through
// aes_round_data while the masked previous round key goes through
// masked_key_expansion; both take five cycles, after which the plain round key
// is XORed onto the state (AddRoundKey) and the masked round key is handed on,
// from this round's masked_key_bank, to the next round.
//
// Round ROUND (1..10) uses round constant rcon(ROUND); round 10 skips
// MixColumns. in_valid/state_in/mk_in at cycle t give out_valid/state_out/
// mk_out at cycle t+5. state_out is the XOR of two registers, so the
// AddRoundKey XOR sits in front of the next round's SubBytes.
module aes_round
  import aes_pkg::*;
#(
  parameter int unsigned ROUND = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  state_t     state_in,
  input  key_words_t mk_in,
  output logic       out_valid,
  output state_t     state_out,
  output key_words_t mk_out
);

  state_t     data_q;
  key_words_t rk;

  aes_round_data #(.FINAL(ROUND == NR)) u_data (
    .clk      (clk),
    .rst      (rst),
    .state_in (state_in),
    .state_out(data_q)
  );

  masked_key_expansion #(.RCON(rcon(ROUND))) u_ke (
    .clk      (clk),
    .rst      (rst),
    .in_valid (in_valid),
    .mk_in    (mk_in),
    .out_valid(out_valid),
    .round_key(rk),
    .mk_out   (mk_out)
  );

  assign state_out = data_q ^ rk;

endmodule
