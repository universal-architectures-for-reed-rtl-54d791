// tb_rs_sram: writes random words to every address of a 512 x 8 single-port
// RAM, reads them back in a random order and checks each read returns the word
// written, one cycle after the request, and that a cycle with en low keeps the
// last read data.
`timescale 1ns/1ps
module tb_rs_sram;
  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic       en = 0, we = 0;
  logic [8:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] ref_mem [512];

  rs_sram #(.DEPTH(512), .W(8)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 9'(a); wdata = 8'($urandom); ref_mem[a] = wdata;
    end
    for (int k = 0; k < 1000; k++) begin
      automatic int a = $urandom_range(511);
      @(negedge clk);
      en = 1; we = 0; addr = 9'(a);
      @(negedge clk);
      en = 0; addr = 9'($urandom);
      checks++;
      if (rdata != ref_mem[a]) begin
        failures++;
        $display("address %0d: %h expected %h", a, rdata, ref_mem[a]);
      end
      @(negedge clk);
      checks++;
      if (rdata != ref_mem[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
