// sub_word: applies aes_sbox (or its inverse, INVERSE = 1) to each of the four
// bytes of a 32-bit key word. Combinational.
module sub_word
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  word_t in,
  output word_t out
);

  for (genvar i = 0; i < 4; i++) begin : g_byte
    aes_sbox #(.INVERSE(INVERSE)) u_sbox (.in(in[8*i +: 8]), .out(out[8*i +: 8]));
  end

endmodule
