// tb_key_leak_analysis: statistical check of what a key-leaking Trojan could
// read from the key storage of aes_masked_top. It streams random blocks with
// random keys and, for each of the eleven key stores (the input stage and the
// store at the end of every round), samples the stored 128-bit word and the
// plain round key it stands for. It then reports, per store:
//   - the Pearson correlation between stored byte and plain key byte,
//   - the mean Hamming distance between stored word and plain round key,
// and checks that every stored word is exactly the S-box image of its round
// key (so a Trojan copying storage never sees the key itself), that the
// correlation is near zero and that the Hamming distance is near 64 bits.
// Over all 256 byte values the S-box itself has a correlation of about -0.044
// between input and output, so the samples settle there; the limit is 0.1.
module tb_key_leak_analysis;
  import aes_ref_pkg::*;

  localparam int NBLK = 1500;
  localparam int NR   = 10;

  logic         clk = 1'b0, rst;
  logic         in_valid, out_valid;
  logic [127:0] in_block, in_key, out_block;
  int checks = 0, failures = 0;
  int edge_no = 0;

  aes_masked_top dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_block(in_block), .in_key(in_key),
    .out_valid(out_valid), .out_block(out_block));

  always #5 clk = ~clk;

  logic [127:0] rk_at [128][NR+1];  // round keys of the block that entered at an edge, mod 128
  real   sx [NR+1], sy [NR+1], sxx [NR+1], syy [NR+1], sxy [NR+1];
  longint hd [NR+1];
  int    ns [NR+1];
  int    mism [NR+1];

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] stored(int r);
    return (r == 0) ? 128'(dut.mk0) : 128'(dut.mk[r]);
  endfunction

  function automatic bit stage_valid(int r);
    return (r == 0) ? dut.v0 : dut.v[r];
  endfunction

  // Sample every store just after each clock edge.
  always @(posedge clk) begin
    edge_no++;
    #1;
    if (!rst) begin
      for (int r = 0; r <= NR; r++) begin
        if (stage_valid(r)) begin
          logic [127:0] k, m;
          int e;
          e = edge_no - 5 * r;
          k = rk_at[e % 128][r];
          m = stored(r);
          if (m !== mask128(k)) mism[r]++;
          hd[r] += $countones(m ^ k);
          for (int b = 0; b < 16; b++) begin
            real x, y;
            x = real'(k[8*b +: 8]);
            y = real'(m[8*b +: 8]);
            sx[r] += x; sy[r] += y; sxx[r] += x*x; syy[r] += y*y; sxy[r] += x*y;
          end
          ns[r]++;
        end
      end
    end
  end

  initial begin
    for (int r = 0; r <= NR; r++) begin
      sx[r] = 0; sy[r] = 0; sxx[r] = 0; syy[r] = 0; sxy[r] = 0;
      hd[r] = 0; ns[r] = 0; mism[r] = 0;
    end
    rst = 1'b1; in_valid = 1'b0; in_block = '0; in_key = '0;
    repeat (2) @(posedge clk);
    #2 rst = 1'b0;
    for (int n = 0; n < NBLK; n++) begin
      logic [127:0] k;
      k = rand128();
      in_valid = 1'b1;
      in_block = rand128();
      in_key   = k;
      // this block is captured at the coming edge, number edge_no + 1
      for (int r = 0; r <= NR; r++) begin
        rk_at[(edge_no + 1) % 128][r] = k;
        if (r < NR) k = next_key(k, rcon(r + 1));
      end
      @(posedge clk); #2;
    end
    in_valid = 1'b0;
    repeat (60) @(posedge clk);
    #2;
    for (int r = 0; r <= NR; r++) begin
      real n, rho, mhd;
      n   = real'(ns[r]) * 16.0;
      rho = (n * sxy[r] - sx[r] * sy[r]) /
            ($sqrt(n * sxx[r] - sx[r] * sx[r]) * $sqrt(n * syy[r] - sy[r] * sy[r]));
      mhd = real'(hd[r]) / real'(ns[r]);
      $display("key store %2d: samples=%0d  byte correlation=%8.5f  mean Hamming distance=%6.2f bits",
               r, ns[r], rho, mhd);
      checks += 4;
      if (ns[r] != NBLK) begin
        failures++; $display("FAIL store %0d sampled %0d keys", r, ns[r]);
      end
      if (mism[r] != 0) begin
        failures++; $display("FAIL store %0d: %0d stored words are not the masked round key", r, mism[r]);
      end
      if (rho > 0.1 || rho < -0.1) begin
        failures++; $display("FAIL store %0d correlates with the key", r);
      end
      if (mhd < 60.0 || mhd > 68.0) begin
        failures++; $display("FAIL store %0d Hamming distance off", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
