// tb_aes_round: drives the first and the last round with random states and
// random masked keys, bubbles included, and checks state_out (SubBytes,
// ShiftRows, MixColumns unless last, AddRoundKey with the expanded key) and
// mk_out (masked expanded key) against the reference model, with latency 5.
module tb_aes_round;
  import aes_pkg::state_t;
  import aes_pkg::key_words_t;
  import aes_ref_pkg::*;

  logic       clk = 1'b0, rst;
  logic       in_valid;
  state_t     st_in;
  key_words_t mk_in;
  logic       v1, v10;
  state_t     so1, so10;
  key_words_t mk1, mk10;
  int checks = 0, failures = 0;
  int cycle = 0;

  aes_round #(.ROUND(1)) dut1 (
    .clk(clk), .rst(rst), .in_valid(in_valid), .state_in(st_in), .mk_in(mk_in),
    .out_valid(v1), .state_out(so1), .mk_out(mk1));
  aes_round #(.ROUND(10)) dut10 (
    .clk(clk), .rst(rst), .in_valid(in_valid), .state_in(st_in), .mk_in(mk_in),
    .out_valid(v10), .state_out(so10), .mk_out(mk10));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  typedef struct { logic [127:0] s, k; int t; } item_t;
  item_t q [$];
  int outs = 0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (v1 !== v10) begin
        failures++;
        $display("FAIL valid mismatch");
      end
      if (v1) begin
        item_t it;
        logic [127:0] k1, k10;
        it = q.pop_front();
        outs++;
        k1  = next_key(it.k, 8'h01);
        k10 = next_key(it.k, 8'h36);
        checks += 5;
        if (128'(so1) !== (round_fn(it.s, 1'b0) ^ k1)) begin
          failures++; $display("FAIL round 1 state got=%032h", 128'(so1));
        end
        if (128'(so10) !== (round_fn(it.s, 1'b1) ^ k10)) begin
          failures++; $display("FAIL round 10 state got=%032h", 128'(so10));
        end
        if (128'(mk1) !== mask128(k1)) begin
          failures++; $display("FAIL round 1 masked key");
        end
        if (128'(mk10) !== mask128(k10)) begin
          failures++; $display("FAIL round 10 masked key");
        end
        if (cycle - it.t != 5) begin
          failures++; $display("FAIL latency %0d", cycle - it.t);
        end
      end
    end
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; st_in = '0; mk_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      item_t it;
      in_valid = ($urandom % 3 != 0);
      it.s = rand128();
      it.k = rand128();
      it.t = cycle + 1;
      st_in = state_t'(it.s);
      mk_in = key_words_t'(mask128(it.k));
      if (in_valid) q.push_back(it);
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (8) @(posedge clk);
    #1;
    checks++;
    if (q.size() != 0 || outs < 150) begin
      failures++;
      $display("FAIL outputs=%0d pending=%0d", outs, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
