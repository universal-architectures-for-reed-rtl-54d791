// tb_rs_field_cfg: checks the field-definition unit. For several fields and
// code lengths it compares every derived constant with powers of alpha worked
// out by plain repeated multiplication, checks the latched p(x) (x^m bit added,
// coefficients above m dropped) and that busy lasts 264 + 7 cycles.
`timescale 1ns/1ps
module tb_rs_field_cfg;
  import tb_gf_pkg::*;
  import rs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic       def = 1'b0;
  logic [7:0] coe, n;
  logic [3:0] m;
  logic [5:0] nk;
  rs_cfg_t    cfg;
  logic       busy;
  gf_t        one_m, to_mont, era_start;
  gf_t        alpha_m [NK_MAX];
  gf_t        beta_m [8];

  rs_field_cfg dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(int mm, int pp, int nn, int nnk);
    int full = pp | (1 << mm);
    int cyc = 0;
    @(negedge clk);
    def = 1; m = 4'(mm); coe = 8'(pp | 8'h80 & ~((1 << mm) - 1) & 8'hff); n = 8'(nn); nk = 6'(nnk);
    if (mm == 8) coe = 8'(pp);
    @(negedge clk);
    def = 0;
    while (busy) begin @(negedge clk); cyc++; end
    chk(cyc == 271, $sformatf("busy for %0d cycles", cyc));
    chk(int'(cfg.p) == full, $sformatf("p = %h", cfg.p));
    chk(cfg.m == 4'(mm) && cfg.n == 8'(nn) && cfg.nk == 6'(nnk), "code parameters");
    chk(int'(one_m) == apow(mm, full, mm), "one_m");
    chk(int'(to_mont) == apow(2 * mm, full, mm), "to_mont");
    chk(int'(era_start) == apow(nn - 1 + mm, full, mm), "era_start");
    for (int i = 0; i < 32; i++)
      chk(int'(alpha_m[i]) == apow(i + 1 + mm, full, mm), $sformatf("alpha_m[%0d]", i));
    for (int i = 0; i < 8; i++)
      chk(int'(beta_m[i]) == apow(-(nn - 1) * (i + 1) + mm, full, mm),
          $sformatf("m=%0d n=%0d beta_m[%0d]=%h", mm, nn, i, beta_m[i]));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(8, 'h1d, 255, 32);
    run(8, 'h2d, 204, 16);
    run(8, 'h1d, 62, 32);
    run(7, 'h09, 127, 6);
    run(6, 'h03, 40, 10);
    run(4, 'h03, 15, 6);
    run(3, 'h03, 7, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
