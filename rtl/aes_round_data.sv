// aes_round_data: the data half of one AES round, SubBytes, ShiftRows and
// MixColumns (MixColumns left out when FINAL = 1, as in the last AES round),
// pipelined to the same five-cycle latency as masked_key_expansion so that the
// state and its round key leave a round in the same cycle. AddRoundKey is done
// by the enclosing aes_round.
//
// Stages: S1 SubBytes, S2 ShiftRows, S3 MixColumns, S4 and S5 alignment
// registers. state_in at cycle t gives state_out at cycle t+5, a new state
// every cycle. The registers load every cycle; validity is tracked by the key
// expansion next to it. Placing one sub-operation per stage, and the two
// alignment stages, is this design's choice.
module aes_round_data
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  logic   clk,
  input  logic   rst,
  input  state_t state_in,
  output state_t state_out
);

  state_t sb_c;
  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox #(.INVERSE(1'b0)) u_sbox (.in(state_in[i]), .out(sb_c[i]));
  end

  state_t s1, s2, s3, s4, s5;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0; s2 <= '0; s3 <= '0; s4 <= '0; s5 <= '0;
    end else begin
      s1 <= sb_c;
      s2 <= shift_rows(s1);
      s3 <= FINAL ? s2 : mix_columns(s2);
      s4 <= s3;
      s5 <= s4;
    end
  end

  assign state_out = s5;

endmodule
