// tb_rs_inv_table: fills the on-the-fly inversion table for several fields and
// reads back every nonzero element: the entry at the Montgomery form of v must
// be the Montgomery form of v^-1 (reference inverse by search). Also checks the
// fill time of 2^m cycles, the zero entry and the one-cycle read latency.
`timescale 1ns/1ps
module tb_rs_inv_table;
  import tb_gf_pkg::*;
  import rs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  rs_cfg_t cfg;
  gf_t     one_m;
  logic    fill = 0, busy, rd_en = 0;
  gf_t     rd_addr = '0, rd_data;

  rs_inv_table dut (.*);

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

  task automatic run(int mm, int full);
    int xm = apow(mm, full, mm);
    int cyc = 0;
    cfg.m = 4'(mm); cfg.p = 9'(full); cfg.n = 8'((1 << mm) - 1); cfg.nk = 6'd2;
    one_m = 8'(xm);
    @(negedge clk);
    fill = 1;
    @(negedge clk);
    fill = 0;
    while (busy) begin @(negedge clk); cyc++; end
    chk(cyc == (1 << mm), $sformatf("fill took %0d cycles", cyc));
    for (int v = 0; v < (1 << mm); v++) begin
      @(negedge clk);
      rd_en = 1;
      rd_addr = 8'(gmul(v, xm, full, mm));
      @(negedge clk);
      rd_en = 0;
      rd_addr = 8'($urandom);
      chk(int'(rd_data) == ((v == 0) ? 0 : gmul(ginv(v, full, mm), xm, full, mm)),
          $sformatf("m=%0d inverse of %h", mm, v));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(8, 'h11d);
    run(8, 'h12d);
    run(7, 'h89);
    run(4, 'h13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
