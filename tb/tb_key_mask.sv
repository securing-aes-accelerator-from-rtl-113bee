// tb_key_mask: the masked key must be the S-box of every key byte. Checks the
// FIPS-197 key and random keys against the reference model, and that the mask
// is undone by the inverse S-box.
module tb_key_mask;
  import aes_pkg::key_words_t;
  import aes_ref_pkg::*;

  logic [127:0] key;
  key_words_t   masked;
  int checks = 0, failures = 0;

  key_mask dut (.key(key_words_t'(key)), .masked(masked));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    checks++;
    if (128'(masked) !== 128'hf1f3594734e4b524626859c4018a84eb) begin
      failures++;
      $display("FAIL fixed key: %032h", 128'(masked));
    end
    for (int n = 0; n < 500; n++) begin
      logic [127:0] m;
      key = rand128();
      #1;
      m = 128'(masked);
      checks++;
      if (m !== mask128(key)) begin
        failures++;
        $display("FAIL key=%032h got=%032h exp=%032h", key, m, mask128(key));
      end
      checks++;
      for (int b = 0; b < 16; b++)
        if (isb(m[8*b +: 8]) !== key[8*b +: 8]) begin
          failures++;
          $display("FAIL unmask byte %0d", b);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
