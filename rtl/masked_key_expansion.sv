// masked_key_expansion: one step of the AES-128 key schedule that works on a
// masked key. It reads the previous round key in masked form
// (Kbi' = SubWord(Kbi), as stored in a masked_key_bank), produces the next
// round key in plain form for AddRoundKey, and writes the next round key back
// in masked form into its own masked_key_bank.
//
// Because the stored words are already S-box substituted, the SubWord step of
// the standard schedule is not computed here: RotWord(Kb3') already equals
// SubWord(RotWord(Kb3)). The plain words are recovered with the inverse S-box:
//   Kbnew0 = InvSub(Kb0') ^ RotWord(Kb3') ^ {RCON,24'h0}
//   Kbnew1 = InvSub(Kb1') ^ Kbnew0
//   Kbnew2 = InvSub(Kb2') ^ Kbnew1
//   Kbnew3 = InvSub(Kb3') ^ Kbnew2
// which gives exactly the standard AES-128 round key.
//
// Five pipeline stages, one operation each, so that a new key is accepted
// every cycle (initiation interval 1):
//   S1  unmask the four words (inverse S-box); RotWord(Kb3') ^ Rcon
//   S2  Kbnew0
//   S3  Kbnew1, mask Kbnew0
//   S4  Kbnew2, mask Kbnew1
//   S5  Kbnew3, mask Kbnew2 and Kbnew3; write all four masked words to the bank
// Latency: mk_in/in_valid at cycle t give round_key, mk_out and out_valid at
// cycle t+5. Registers that hold unmasked key words are cleared whenever their
// stage carries no valid key, so between jobs only masked key material stays
// in the unit. The split into these five stages is this design's choice; the
// stage count and the equations follow the method it implements.
module masked_key_expansion
  import aes_pkg::*;
#(
  parameter byte_t RCON = 8'h01
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  key_words_t mk_in,      // masked previous round key
  output logic       out_valid,
  output key_words_t round_key,  // plain next round key, for AddRoundKey
  output key_words_t mk_out      // masked next round key, from the bank
);

  // ---- S1: unmask, rotate, add Rcon ---------------------------------------
  key_words_t plain_c;
  for (genvar w = 0; w < 4; w++) begin : g_unmask
    sub_word #(.INVERSE(1'b1)) u_inv (.in(mk_in[w]), .out(plain_c[w]));
  end

  logic       v1, v2, v3, v4, v5;
  key_words_t a1;          // unmasked Kb0..Kb3
  word_t      t1;          // RotWord(Kb3') ^ Rcon
  word_t      n0_2, a1_2, a2_2, a3_2;
  word_t      n0_3, n1_3, a2_3, a3_3, m0_3;
  word_t      n0_4, n1_4, n2_4, a3_4, m0_4, m1_4;
  key_words_t rk5;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      a1 <= '0;
      t1 <= '0;
    end else begin
      v1 <= in_valid;
      a1 <= in_valid ? plain_c : '0;
      t1 <= in_valid ? (rot_word(mk_in[3]) ^ {RCON, 24'h0}) : '0;
    end
  end

  // ---- S2: Kbnew0 ----------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst || !v1) begin
      v2 <= 1'b0;
      n0_2 <= '0; a1_2 <= '0; a2_2 <= '0; a3_2 <= '0;
    end else begin
      v2 <= 1'b1;
      n0_2 <= a1[0] ^ t1;
      a1_2 <= a1[1];
      a2_2 <= a1[2];
      a3_2 <= a1[3];
    end
  end

  // ---- S3: Kbnew1, mask Kbnew0 --------------------------------------------
  word_t m0_c;
  sub_word #(.INVERSE(1'b0)) u_mask0 (.in(n0_2), .out(m0_c));

  always_ff @(posedge clk) begin
    if (rst || !v2) begin
      v3 <= 1'b0;
      n0_3 <= '0; n1_3 <= '0; a2_3 <= '0; a3_3 <= '0; m0_3 <= '0;
    end else begin
      v3 <= 1'b1;
      n0_3 <= n0_2;
      n1_3 <= a1_2 ^ n0_2;
      a2_3 <= a2_2;
      a3_3 <= a3_2;
      m0_3 <= m0_c;
    end
  end

  // ---- S4: Kbnew2, mask Kbnew1 --------------------------------------------
  word_t m1_c;
  sub_word #(.INVERSE(1'b0)) u_mask1 (.in(n1_3), .out(m1_c));

  always_ff @(posedge clk) begin
    if (rst || !v3) begin
      v4 <= 1'b0;
      n0_4 <= '0; n1_4 <= '0; n2_4 <= '0; a3_4 <= '0; m0_4 <= '0; m1_4 <= '0;
    end else begin
      v4 <= 1'b1;
      n0_4 <= n0_3;
      n1_4 <= n1_3;
      n2_4 <= a2_3 ^ n1_3;
      a3_4 <= a3_3;
      m0_4 <= m0_3;
      m1_4 <= m1_c;
    end
  end

  // ---- S5: Kbnew3, mask Kbnew2/Kbnew3, store -------------------------------
  word_t      n3_c, m2_c, m3_c;
  key_words_t wr_masked;

  always_comb n3_c = a3_4 ^ n2_4;
  sub_word #(.INVERSE(1'b0)) u_mask2 (.in(n2_4), .out(m2_c));
  sub_word #(.INVERSE(1'b0)) u_mask3 (.in(n3_c), .out(m3_c));
  always_comb wr_masked = '{m0_4, m1_4, m2_c, m3_c};

  always_ff @(posedge clk) begin
    if (rst || !v4) begin
      v5  <= 1'b0;
      rk5 <= '0;
    end else begin
      v5  <= 1'b1;
      rk5 <= '{n0_4, n1_4, n2_4, n3_c};
    end
  end

  masked_key_bank u_bank (
    .clk  (clk),
    .rst  (rst),
    .we   ({4{v4}}),
    .wdata(wr_masked),
    .rdata(mk_out)
  );

  assign out_valid = v5;

  // A round key only ever leaves KE_STAGES cycles after a masked key entered,
  // and no plain round key is presented without out_valid.
  a_latency : assert property (@(posedge clk) disable iff (rst)
    out_valid |-> $past(in_valid, KE_STAGES));
  a_clear : assert property (@(posedge clk) disable iff (rst)
    !out_valid |-> round_key == '0);
  assign round_key = rk5;

endmodule
