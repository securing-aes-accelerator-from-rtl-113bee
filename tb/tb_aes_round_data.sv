// tb_aes_round_data: streams random states into a middle round and a final
// round (no MixColumns) and checks each output, five cycles later, against
// the reference round function; also checks the FIPS-197 round-1 example.
module tb_aes_round_data;
  import aes_pkg::state_t;
  import aes_ref_pkg::*;

  logic   clk = 1'b0, rst;
  state_t din, dout_m, dout_f;
  int checks = 0, failures = 0;

  aes_round_data #(.FINAL(1'b0)) dut_m (.clk(clk), .rst(rst), .state_in(din), .state_out(dout_m));
  aes_round_data #(.FINAL(1'b1)) dut_f (.clk(clk), .rst(rst), .state_in(din), .state_out(dout_f));

  always #5 clk = ~clk;

  logic [127:0] hist [$];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      logic [127:0] x;
      // FIPS-197 A.1: round 1 input 193de3be... -> after MixColumns 046681e5...
      x = (n == 0) ? 128'h193de3bea0f4e22b9ac68d2ae9f84808 : rand128();
      din = state_t'(x);
      hist.push_back(x);
      @(posedge clk); #1;
      if (hist.size() > 4) begin
        logic [127:0] y;
        y = hist.pop_front();
        checks += 2;
        if (128'(dout_m) !== round_fn(y, 1'b0)) begin
          failures++;
          $display("FAIL middle round in=%032h got=%032h", y, 128'(dout_m));
        end
        if (128'(dout_f) !== round_fn(y, 1'b1)) begin
          failures++;
          $display("FAIL final round in=%032h got=%032h", y, 128'(dout_f));
        end
      end
      if (n == 4) begin
        checks++;
        if (128'(dout_m) !== 128'h046681e5e0cb199a48f8d37a2806264c) begin
          failures++;
          $display("FAIL FIPS round 1 got=%032h", 128'(dout_m));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
