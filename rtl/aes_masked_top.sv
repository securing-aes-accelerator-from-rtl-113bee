// aes_masked_top: fully pipelined AES-128 encryption accelerator whose key is
// masked wherever it is stored, against hardware Trojans that try to leak the
// key from on-chip memory.
//
// A plaintext block and its key enter together (in_valid). The plain key is
// used exactly once, for the initial AddRoundKey, in the input register stage;
// in the same cycle it is masked (every byte through the S-box) and only the
// masked form is stored. Ten aes_round stages follow; each expands the next
// round key from the previous masked key, applies it, and stores it masked
// again. Every cycle a new block with a new key may enter, so the pipeline
// encrypts 128 bits per clock.
//
// Interface: a valid-qualified stream with no back-pressure. out_valid rises
// LATENCY = 52 cycles after the matching in_valid (1 input stage, 10 rounds of
// 5 stages, 1 output stage), in the same order. Synchronous active-high reset.
// Bytes are in AES order: bit 127..120 is byte 0.
//
// The single plain use of the key, the masking before storage and the
// five-stage rounds follow the masking method. Taking a fresh key with every
// block, the valid-only interface and the reset are this design's choices.
module aes_masked_top
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [127:0] in_block,  // plaintext
  input  logic [127:0] in_key,    // cipher key
  output logic         out_valid,
  output logic [127:0] out_block  // ciphertext
);

  // ---- input stage: initial AddRoundKey, then mask the key -----------------
  key_words_t key_w, key_masked;
  assign key_w = key_words_t'(in_key);

  key_mask u_mask (.key(key_w), .masked(key_masked));

  logic   v0;
  state_t s0;

  always_ff @(posedge clk) begin
    if (rst) begin
      v0 <= 1'b0;
      s0 <= '0;
    end else begin
      v0 <= in_valid;
      s0 <= state_t'(in_block ^ in_key);
    end
  end

  key_words_t mk0;
  masked_key_bank u_bank0 (
    .clk  (clk),
    .rst  (rst),
    .we   ({4{in_valid}}),
    .wdata(key_masked),
    .rdata(mk0)
  );

  // ---- ten rounds -----------------------------------------------------------
  logic       v   [NR+1];
  state_t     st  [NR+1];
  key_words_t mk  [NR+1];

  assign v[0]  = v0;
  assign st[0] = s0;
  assign mk[0] = mk0;

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_round #(.ROUND(r)) u_round (
      .clk      (clk),
      .rst      (rst),
      .in_valid (v[r-1]),
      .state_in (st[r-1]),
      .mk_in    (mk[r-1]),
      .out_valid(v[r]),
      .state_out(st[r]),
      .mk_out   (mk[r])
    );
  end

  // ---- output register ------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_block <= '0;
    end else begin
      out_valid <= v[NR];
      out_block <= st[NR];
    end
  end

  // A ciphertext only ever leaves LATENCY cycles after a block entered.
  a_latency : assert property (@(posedge clk) disable iff (rst)
    out_valid |-> $past(in_valid, LATENCY));

endmodule
