// tb_aes_sbox: checks the forward and inverse S-box on all 256 inputs against
// the reference model, plus a few published values (FIPS-197: S(00)=63,
// S(53)=ed, S(ff)=16).
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] in, fwd, inv;
  int checks = 0, failures = 0;

  aes_sbox #(.INVERSE(1'b0)) dut_f (.in(in), .out(fwd));
  aes_sbox #(.INVERSE(1'b1)) dut_i (.in(in), .out(inv));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%02h got=%02h exp=%02h", what, in, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      in = 8'(i);
      #1;
      check(fwd, sb(in), "sbox");
      check(inv, isb(in), "inv_sbox");
    end
    in = 8'h00; #1; check(fwd, 8'h63, "fips");
    in = 8'h53; #1; check(fwd, 8'hed, "fips");
    in = 8'hff; #1; check(fwd, 8'h16, "fips");
    in = 8'h63; #1; check(inv, 8'h00, "fips");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
