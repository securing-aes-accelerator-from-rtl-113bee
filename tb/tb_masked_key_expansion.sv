// tb_masked_key_expansion: feeds a masked round key every cycle (with random
// bubbles) and checks, five cycles later, the plain next round key against the
// textbook key schedule and the masked copy against the S-box of it. Also
// checks that the unit accepts a new key every cycle, that the latency is 5,
// and that no unmasked key word stays in the unit after the pipeline drains.
module tb_masked_key_expansion;
  import aes_pkg::key_words_t;
  import aes_ref_pkg::*;

  localparam logic [7:0] RC = 8'h04;  // round 3

  logic       clk = 1'b0, rst;
  logic       in_valid, out_valid;
  key_words_t mk_in, round_key, mk_out;
  int checks = 0, failures = 0;
  int cycle = 0;

  masked_key_expansion #(.RCON(RC)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .mk_in(mk_in),
    .out_valid(out_valid), .round_key(round_key), .mk_out(mk_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  logic [127:0] exp_q [$];
  int           t_q   [$];
  int           b2b = 0, last_in = -10;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard on the output side.
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      logic [127:0] k;
      int t;
      k = exp_q.pop_front();
      t = t_q.pop_front();
      checks++;
      if (128'(round_key) !== next_key(k, RC)) begin
        failures++;
        $display("FAIL round key got=%032h exp=%032h", 128'(round_key), next_key(k, RC));
      end
      checks++;
      if (128'(mk_out) !== mask128(next_key(k, RC))) begin
        failures++;
        $display("FAIL masked key got=%032h", 128'(mk_out));
      end
      checks++;
      if (cycle - t != 5) begin
        failures++;
        $display("FAIL latency %0d", cycle - t);
      end
    end
  end

  initial begin
    logic [127:0] k;
    rst = 1'b1; in_valid = 1'b0; mk_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // FIPS-197 round-2 key -> round-3 key with Rcon 04
    for (int n = 0; n < 300; n++) begin
      in_valid = (n < 20) || ($urandom % 4 != 0);
      k = (n == 0) ? 128'hf2c295f27a96b9435935807a7359f67f : rand128();
      mk_in = key_words_t'(mask128(k));
      if (in_valid) begin
        exp_q.push_back(k);
        t_q.push_back(cycle + 1);
        if (last_in == n - 1) b2b++;
        last_in = n;
      end
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (10) @(posedge clk);
    #1;
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d keys never came out", exp_q.size());
    end
    checks++;
    if (b2b < 100) begin
      failures++;
      $display("FAIL only %0d back-to-back keys", b2b);
    end
    checks++;
    if (round_key !== '0 || dut.a1 !== '0 || dut.n0_4 !== '0) begin
      failures++;
      $display("FAIL unmasked key material left after drain");
    end
    // Known answer (FIPS-197 Appendix A.1): round 2 key f2c295f2 7a96b943
    // 5935807a 7359f67f gives round 3 key 3d80477d 4716fe3e 1e237e44 6d7a883b.
    checks++;
    if (next_key(128'hf2c295f27a96b9435935807a7359f67f, RC) !== 128'h3d80477d4716fe3e1e237e446d7a883b) begin
      failures++;
      $display("FAIL reference model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
