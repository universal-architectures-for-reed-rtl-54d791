// tb_rs_chien: checks the Chien search and Forney evaluator (with its
// inversion table, and the field configuration unit for the constants). For
// random error patterns it builds the errata locator prod (1 + X_k x) and the
// evaluator S(x)Lambda(x) mod x^(n-k) in plain arithmetic, scales both by a
// random nonzero factor, converts them to Montgomery form and loads them. It
// then steps through the n positions and expects, exactly 2 cycles after each
// step, the error value at the error positions and 0 elsewhere, err_last with
// the last one and dec_fail low; a wrong ldeg must raise dec_fail.
`timescale 1ns/1ps
module tb_rs_chien;
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

  rs_field_cfg u_cfg (.*);

  logic       inv_fill = 0, inv_busy, load = 0, step = 0;
  gf_t        lambda [T_MAX+1];
  gf_t        omega  [T_MAX];
  logic [5:0] ldeg;
  logic       err_valid, err_last, dec_fail;
  gf_t        err_val;

  rs_chien dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .one_m(one_m), .alpha_m(alpha_m),
    .beta_m(beta_m), .inv_fill(inv_fill), .inv_busy(inv_busy), .load(load), .lambda(lambda),
    .omega(omega), .ldeg(ldeg), .step(step), .err_valid(err_valid), .err_val(err_val),
    .err_last(err_last), .dec_fail(dec_fail));

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
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

  // expected stream, indexed by step number
  int exp_e [256];
  int got_e [256];
  int got_n;
  logic got_last, got_fail;
  always @(posedge clk) begin
    if (err_valid) begin
      got_e[got_n] <= int'(err_val);
      got_n <= got_n + 1;
      if (err_last) begin got_last <= 1; got_fail <= dec_fail; end
    end
  end

  task automatic run(int mm, int pp, int nn, int nnk, int nerr, bit bad_deg);
    int full = pp | (1 << mm);
    int xm = apow(mm, full, mm);
    int r [256];
    bit used [256];
    int lam [40];
    int s [40];
    int om;
    int pos, sc;
    int t_step [256];
    @(negedge clk);
    def = 1; m = 4'(mm); coe = 8'(pp); n = 8'(nn); nk = 6'(nnk);
    @(negedge clk);
    def = 0;
    while (busy) @(negedge clk);
    inv_fill = 1;
    @(negedge clk);
    inv_fill = 0;
    while (inv_busy) @(negedge clk);
    for (int i = 0; i < 256; i++) begin r[i] = 0; used[i] = 0; end
    for (int i = 0; i < 40; i++) lam[i] = 0;
    lam[0] = 1;
    for (int i = 0; i < nerr; i++) begin
      do pos = $urandom_range(nn - 1); while (used[pos]);
      used[pos] = 1;
      r[pos] = 1 + $urandom_range((1 << mm) - 2);
      for (int j = 39; j >= 1; j--) lam[j] = lam[j] ^ gmul(lam[j - 1], apow(pos, full, mm), full, mm);
    end
    for (int i = 1; i <= nnk; i++) s[i] = peval(r, nn, i, full, mm);
    sc = 1 + $urandom_range((1 << mm) - 2);
    for (int i = 0; i <= 16; i++) lambda[i] = 8'(gmul(gmul(lam[i], sc, full, mm), xm, full, mm));
    for (int i = 0; i < 16; i++) begin
      om = 0;
      if (i < nnk) for (int j = 0; j <= i; j++) om ^= gmul(lam[j], s[i + 1 - j], full, mm);
      omega[i] = 8'(gmul(gmul(om, sc, full, mm), xm, full, mm));
    end
    ldeg = 6'(bad_deg ? nerr + 1 : nerr);
    for (int k = 0; k < nn; k++) exp_e[k] = r[nn - 1 - k];
    got_n = 0; got_last = 0;
    @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
    for (int k = 0; k < nn; k++) begin
      step = 1;
      @(negedge clk);
      // the result of step k must be out 2 cycles after it
      chk(got_n == ((k >= 1) ? k - 1 : 0), $sformatf("latency at step %0d (%0d out)", k, got_n));
    end
    step = 0;
    repeat (3) @(negedge clk);
    chk(got_n == nn && got_last, $sformatf("%0d results, last=%0d", got_n, got_last));
    for (int k = 0; k < nn; k++)
      chk(got_e[k] == exp_e[k], $sformatf("m=%0d n=%0d step %0d: %h expected %h", mm, nn, k, got_e[k], exp_e[k]));
    chk(got_fail == bad_deg, $sformatf("dec_fail %0d", got_fail));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(8, 'h1d, 255, 32, 16, 0);
    run(8, 'h1d, 255, 32, 1, 0);
    run(8, 'h2d, 204, 16, 8, 0);
    run(8, 'h1d, 62, 32, 12, 0);
    run(7, 'h09, 127, 6, 3, 0);
    run(4, 'h03, 15, 6, 3, 0);
    run(8, 'h1d, 255, 32, 5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
