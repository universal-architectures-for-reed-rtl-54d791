// tb_rs_kes: checks the key-equation solver. For random error and erasure
// patterns it gives the solver the syndromes and erasure locators (Montgomery
// form, computed in plain reference arithmetic) and compares the result, made
// monic (divided by Lambda_0, which removes the solver's scale factor), with
// the reference errata locator prod (1 + X_k x) and evaluator S(x)Lambda(x)
// mod x^(n-k). Also checks ldeg, the fail flag for too many erasures, and the
// cycle count from start to done: at most 17(n-k+1)+137, within 2n cycles for
// 16 errors with n-k = 32, and within 230 cycles for 8 errors with
// n-k = 16, which keeps a (204,188) decoder close to one symbol per cycle.
`timescale 1ns/1ps
module tb_rs_kes;
  import tb_gf_pkg::*;
  import rs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  rs_cfg_t    cfg;
  gf_t        one_m;
  logic       start = 0;
  gf_t        syn_in [NK_MAX];
  gf_t        era_in [T_MAX];
  logic [4:0] era_num;
  logic       era_ovf;
  logic       busy, done, fail;
  gf_t        lambda [T_MAX+1];
  gf_t        omega  [T_MAX];
  logic [5:0] ldeg;

  rs_kes dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic run(int mm, int pp, int nn, int nnk, int nerr, int nera, bit expect_fail);
    int full = pp | (1 << mm);
    int xm = apow(mm, full, mm);
    int r [256];
    bit used [256];
    int lam [40];
    int om [40];
    int s [40];
    int pos, nloc, t0, cyc, l0inv;
    for (int i = 0; i < 256; i++) begin r[i] = 0; used[i] = 0; end
    for (int i = 0; i < 40; i++) lam[i] = 0;
    lam[0] = 1;
    nloc = 0;
    for (int i = 0; i < nerr + nera; i++) begin
      do pos = $urandom_range(nn - 1); while (used[pos]);
      used[pos] = 1;
      r[pos] = (i < nerr) ? 1 + $urandom_range((1 << mm) - 2) : $urandom & ((1 << mm) - 1);
      if (i >= nerr) begin
        if (i - nerr < 16) era_in[i - nerr] = 8'(gmul(apow(pos, full, mm), xm, full, mm));
      end
      if (i < nerr || r[pos] != 0 || 1) begin
        // locator factor (1 + alpha^pos x)
        for (int j = 39; j >= 1; j--) lam[j] = lam[j] ^ gmul(lam[j - 1], apow(pos, full, mm), full, mm);
        nloc++;
      end
    end
    for (int i = 1; i <= nnk; i++) s[i] = peval(r, nn, i, full, mm);
    for (int i = 0; i < 40; i++) begin
      om[i] = 0;
      if (i < nnk) for (int j = 0; j <= i; j++) om[i] ^= gmul(lam[j], s[i + 1 - j], full, mm);
    end
    cfg.m = 4'(mm); cfg.p = 9'(full); cfg.n = 8'(nn); cfg.nk = 6'(nnk);
    one_m = 8'(xm);
    for (int i = 0; i < NK_MAX; i++) syn_in[i] = (i < nnk) ? 8'(gmul(s[i + 1], xm, full, mm)) : 8'($urandom);
    era_num = 5'((nera > 16) ? 16 : nera);
    era_ovf = (nera > 16);
    @(negedge clk);
    start = 1;
    t0 = $time;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(fail == expect_fail, $sformatf("fail flag %0d for %0d errors %0d erasures", fail, nerr, nera));
    if (!expect_fail) begin
      // passes walk at most 17 coefficients: n-k+1 passes, 136 Omega steps
      chk(cyc <= (nnk + 1) * 17 + 136 + 1 && cyc > nnk, $sformatf("cycles %0d for n-k=%0d", cyc, nnk));
      if (nnk == 16 && nerr == 8 && nera == 0) begin
        $display("(204,188), 8 errors: %0d cycles", cyc);
        chk(cyc <= 230, "8-error solve for n-k = 16 within 230 cycles");
      end
      if (nnk == 32 && nerr == 16) begin
        $display("n-k = 32, 16 errors: %0d cycles", cyc);
        chk(cyc <= 2 * nn, "16-error solve within the 2n cycles of two syndrome passes");
      end
      chk(int'(ldeg) == nerr + nera, $sformatf("ldeg %0d expected %0d", ldeg, nerr + nera));
      l0inv = ginv(mont(lambda[0], 1, full, mm), full, mm);
      for (int i = 0; i <= 16; i++)
        chk(gmul(mont(lambda[i], 1, full, mm), l0inv, full, mm) == lam[i],
            $sformatf("m=%0d nk=%0d e=%0d s=%0d: Lambda_%0d", mm, nnk, nerr, nera, i));
      for (int i = 0; i < 16; i++)
        chk(gmul(mont(omega[i], 1, full, mm), l0inv, full, mm) == om[i],
            $sformatf("m=%0d nk=%0d e=%0d s=%0d: Omega_%0d", mm, nnk, nerr, nera, i));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(8, 'h1d, 255, 32, 1, 0, 0);
    run(8, 'h1d, 255, 32, 0, 1, 0);
    run(8, 'h1d, 255, 32, 16, 0, 0);
    run(8, 'h1d, 255, 32, 0, 16, 0);
    run(8, 'h1d, 255, 32, 5, 6, 0);
    run(8, 'h1d, 255, 32, 8, 8, 0);
    run(8, 'h2d, 204, 16, 8, 0, 0);
    run(8, 'h2d, 204, 16, 3, 10, 0);
    run(7, 'h09, 127, 6, 3, 0, 0);
    run(4, 'h03, 15, 6, 1, 4, 0);
    for (int k = 0; k < 40; k++) begin
      automatic int ee = $urandom_range(16);
      run(8, 'h1d, 255, 32, ee, $urandom_range(16 - ee), 0);
    end
    for (int k = 0; k < 20; k++) begin
      automatic int ee = $urandom_range(6);
      run(8, 'h2d, 204, 16, ee, $urandom_range(16 - 2 * ee), 0);
    end
    run(8, 'h1d, 255, 32, 0, 17, 1);
    run(8, 'h1d, 255, 10, 0, 12, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
