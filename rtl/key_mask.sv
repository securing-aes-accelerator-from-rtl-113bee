// key_mask: the key-masking function of the design. A 128-bit key (or round
// key), given as the four words Kb0..Kb3, is masked by substituting every byte
// through the AES S-box: Kbi' = SubWord(Kbi). Only the masked form is ever
// written to key storage; the key expansion undoes the mask with the inverse
// S-box when it needs the plain words. Combinational, no clock.
module key_mask
  import aes_pkg::*;
(
  input  key_words_t key,
  output key_words_t masked
);

  for (genvar w = 0; w < 4; w++) begin : g_word
    sub_word #(.INVERSE(1'b0)) u_sub (.in(key[w]), .out(masked[w]));
  end

endmodule
