// tb_rs_fifo: checks the two-bank codeword buffer the way the decoder uses it:
// a codeword is written into one bank while the previous one is read out of
// the other through port B, then the new one is read back through port A (the
// second syndrome pass). Each read must return the symbol written there, one
// cycle after the request.
`timescale 1ns/1ps
module tb_rs_fifo;
  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic       wr_en = 0, wr_bank = 0, ra_en = 0, ra_bank = 0, rb_en = 0, rb_bank = 0;
  logic [8:0] wr_addr = '0, ra_addr = '0, rb_addr = '0;
  logic [7:0] wr_data = '0, ra_data, rb_data;
  logic [7:0] ref_mem [2][512];

  rs_fifo #(.BANK_DEPTH(512), .W(8)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read checks, one cycle after each request
  logic       pa = 0, pb = 0;
  logic [7:0] ea, eb;
  always @(posedge clk) begin
    if (pa) begin
      checks++;
      if (ra_data != ea) begin failures++; $display("port A: %h expected %h", ra_data, ea); end
    end
    if (pb) begin
      checks++;
      if (rb_data != eb) begin failures++; $display("port B: %h expected %h", rb_data, eb); end
    end
    pa <= ra_en; ea <= ref_mem[ra_bank][ra_addr];
    pb <= rb_en; eb <= ref_mem[rb_bank][rb_addr];
  end

  int prev_n = 0;
  initial begin
    for (int f = 0; f < 6; f++) begin
      automatic logic bank = 1'(f);
      automatic int n = 100 + $urandom_range(155);
      // write codeword f into bank, read codeword f-1 out of the other bank
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = bank; wr_addr = 9'(i); wr_data = 8'($urandom);
        ref_mem[bank][i] = wr_data;
        rb_en = (f > 0) && (i < prev_n); rb_bank = !bank; rb_addr = 9'(i);
        ra_bank = bank;   // as in the decoder: port A points at the bank being filled
      end
      @(negedge clk);
      wr_en = 0; rb_en = 0;
      // second pass over the new codeword through port A
      for (int i = 0; i < n; i++) begin
        ra_en = 1; ra_bank = bank; ra_addr = 9'(i);
        @(negedge clk);
      end
      ra_en = 0;
      prev_n = n;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
