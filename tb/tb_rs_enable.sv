// tb_rs_enable: drives random frame pulses and enable/skip requests into the
// per-codeword enable and checks against a reference: after reset the enable
// is 0, it takes en_in && !skip at each frame pulse and holds between pulses.
`timescale 1ns/1ps
module tb_rs_enable;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic frame = 0, en_in = 0, skip = 0, en;
  logic exp_en;

  rs_enable dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++;
    if (en !== 1'b0) failures++;
    rst_n = 1;
    exp_en = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      frame = ($urandom_range(3) == 0); en_in = 1'($urandom); skip = 1'($urandom);
      if (frame) exp_en = en_in && !skip;
      @(posedge clk);
      #0.5;
      checks++;
      if (en != exp_en) begin failures++; $display("cycle %0d: en=%0d expected %0d", k, en, exp_en); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
