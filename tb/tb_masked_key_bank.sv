// tb_masked_key_bank: per-bank writes, parallel reads, hold without write,
// and synchronous reset, checked against a shadow copy kept by the testbench.
module tb_masked_key_bank;
  import aes_pkg::key_words_t;

  logic       clk = 1'b0, rst;
  logic [3:0] we;
  key_words_t wdata, rdata;
  logic [31:0] shadow [4];
  int checks = 0, failures = 0;

  masked_key_bank dut (.clk(clk), .rst(rst), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (rdata[i] !== shadow[i]) begin
        failures++;
        $display("FAIL %s bank %0d got=%08h exp=%08h", what, i, rdata[i], shadow[i]);
      end
    end
  endtask

  initial begin
    rst = 1'b1; we = '0; wdata = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 4; i++) shadow[i] = '0;
    compare("reset");
    for (int n = 0; n < 400; n++) begin
      we = 4'($urandom);
      for (int i = 0; i < 4; i++) wdata[i] = $urandom;
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) if (we[i]) shadow[i] = wdata[i];
      compare("write");
    end
    we = 4'hf;
    @(posedge clk); #1;
    rst = 1'b1; we = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 4; i++) shadow[i] = '0;
    compare("reset2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
