// masked_key_bank: storage for one masked 128-bit key, partitioned into four
// independent 32-bit banks, one per key word Kb0'..Kb3'. Partitioning lets the
// key expansion read all four words in the same cycle and lets each word be
// written on its own (we[i] writes bank i). The banks only ever receive masked
// words; a synchronous active-high reset clears them.
//
// Timing: a write in cycle t is visible on rdata from cycle t+1. Reads are
// asynchronous (register file style), as distributed RAM or flip-flops give.
// Partitioning the key store follows the method; one bank per word, the
// register implementation and the reset are this design's choices.
module masked_key_bank
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] we,     // we[i] writes bank i (word Kbi')
  input  key_words_t wdata,
  output key_words_t rdata
);

  word_t bank [4];

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (rst)        bank[i] <= '0;
      else if (we[i]) bank[i] <= wdata[i];
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++) rdata[i] = bank[i];
  end

endmodule
