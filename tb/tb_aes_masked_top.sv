// tb_aes_masked_top: end-to-end test of the masked AES-128 pipeline at its
// only configuration.
//   - FIPS-197 known answers (Appendix B and Appendix C.1).
//   - A burst of blocks entering every cycle, each with its own key, to show
//     one block per clock (throughput) and the 52-cycle latency.
//   - Random traffic with bubbles, a reset in mid-stream.
//   - Key masking: the key storage of the input stage must hold the S-box
//     image of the key, never the key itself; the average Hamming distance
//     between stored and plain key is reported.
// Every ciphertext is compared with an independent software AES. Mechanism
// counters (back-to-back blocks, bubbles, key changes, masked stores, mid-
// stream reset) must all be non-zero.
module tb_aes_masked_top;
  import aes_ref_pkg::*;

  localparam int LAT = aes_pkg::LATENCY;

  logic         clk = 1'b0, rst;
  logic         in_valid, out_valid;
  logic [127:0] in_block, in_key, out_block;
  int checks = 0, failures = 0;
  int cycle = 0;

  aes_masked_top dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_block(in_block), .in_key(in_key),
    .out_valid(out_valid), .out_block(out_block));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  typedef struct { logic [127:0] exp; int t; } item_t;
  item_t q [$];

  int n_out = 0, n_b2b = 0, n_bubble = 0, n_keychg = 0, n_masked = 0, n_reset = 0;
  longint hd_sum = 0;
  logic [127:0] last_key = '0;
  logic         prev_valid = 1'b0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %032h", out_block);
      end else begin
        it = q.pop_front();
        n_out++;
        checks++;
        if (out_block !== it.exp) begin
          failures++;
          $display("FAIL ct got=%032h exp=%032h", out_block, it.exp);
        end
        checks++;
        if (cycle - it.t != LAT) begin
          failures++;
          $display("FAIL latency %0d", cycle - it.t);
        end
      end
    end
  end

  // Drive one cycle; v = 0 is a bubble.
  task automatic drive(bit v, logic [127:0] pt, logic [127:0] key);
    item_t it;
    in_valid = v;
    in_block = pt;
    in_key   = key;
    if (v) begin
      it.exp = encrypt(pt, key);
      it.t   = cycle + 1;
      q.push_back(it);
      if (prev_valid) n_b2b++;
      if (key != last_key) n_keychg++;
      last_key = key;
    end else begin
      n_bubble++;
    end
    prev_valid = v;
    @(posedge clk); #1;
    if (v) begin
      // the stored key of the input stage must be the masked key
      logic [127:0] stored;
      stored = 128'(dut.mk0);
      checks += 2;
      if (stored !== mask128(key)) begin
        failures++;
        $display("FAIL stored key is not the masked key");
      end
      if (stored === key) begin
        failures++;
        $display("FAIL plain key in storage");
      end
      n_masked++;
      hd_sum += $countones(stored ^ key);
    end
  endtask

  task automatic drain();
    in_valid = 1'b0;
    prev_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    #1;
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d blocks missing", q.size());
      q.delete();
    end
  endtask

  initial begin
    int t_first, burst_out_start;
    rst = 1'b1; in_valid = 1'b0; in_block = '0; in_key = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // known answers
    drive(1'b1, 128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    drive(1'b1, 128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f);
    checks += 2;
    if (encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c)
        !== 128'h3925841d02dc09fbdc118597196a0b32) begin
      failures++; $display("FAIL reference model, FIPS-197 B");
    end
    if (encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++; $display("FAIL reference model, FIPS-197 C.1");
    end
    drain();

    // burst: 256 blocks back to back, each with a new key
    t_first = cycle + 1;
    burst_out_start = n_out;
    for (int n = 0; n < 256; n++) drive(1'b1, rand128(), rand128());
    drain();
    checks++;
    if (n_out - burst_out_start != 256) begin
      failures++;
      $display("FAIL burst produced %0d blocks", n_out - burst_out_start);
    end
    $display("burst: 256 blocks entered in %0d cycles (one per clock), latency %0d",
             cycle - LAT - 3 - t_first + 1, LAT);

    // random traffic with bubbles; some runs share a key
    begin
      logic [127:0] k;
      k = rand128();
      for (int n = 0; n < 1500; n++) begin
        if ($urandom % 8 == 0) k = rand128();
        drive(($urandom % 4) != 0, rand128(), k);
      end
    end
    drain();

    // reset with blocks in flight: they must vanish, and the pipeline restarts
    for (int n = 0; n < 20; n++) drive(1'b1, rand128(), rand128());
    in_valid = 1'b0;
    prev_valid = 1'b0;
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    q.delete();
    n_reset++;
    repeat (LAT + 3) begin
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL output after reset");
      end
    end
    for (int n = 0; n < 50; n++) drive(1'b1, rand128(), rand128());
    drain();

    $display("blocks=%0d back_to_back=%0d bubbles=%0d key_changes=%0d masked_stores=%0d resets=%0d",
             n_out, n_b2b, n_bubble, n_keychg, n_masked, n_reset);
    $display("mean Hamming distance stored/plain key = %0.2f bits of 128",
             real'(hd_sum) / real'(n_masked));
    checks++;
    if (n_b2b == 0 || n_bubble == 0 || n_keychg == 0 || n_masked == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    checks++;
    if (real'(hd_sum) / real'(n_masked) < 54.0 || real'(hd_sum) / real'(n_masked) > 74.0) begin
      failures++;
      $display("FAIL masked key too close to / too far from plain key");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
