// tb_rs_syndrome: checks the syndrome and erasure-value calculator, driven by
// the field configuration unit, against reference syndromes R(alpha^i) and
// erasure locators alpha^j computed in plain arithmetic (then put in
// Montgomery form, times x^m). Covers both passes (S1..S16 from the input,
// S17..S32 from a second feed), erasure overflow, lo_zero on a clean codeword,
// and that a pass takes one symbol per cycle (done one cycle after the last).
`timescale 1ns/1ps
module tb_rs_syndrome;
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

  rs_field_cfg u_cfg (.clk(clk), .rst_n(rst_n), .def(def), .coe(coe), .m(m), .n(n), .nk(nk),
    .cfg(cfg), .busy(busy), .one_m(one_m), .to_mont(to_mont), .alpha_m(alpha_m),
    .era_start(era_start), .beta_m(beta_m));

  logic start = 0, pass2 = 0, in_valid = 0, in_era = 0;
  gf_t  in_sym = '0;
  logic done, lo_zero, era_ovf;
  gf_t  syn [NK_MAX];
  gf_t  era_val [T_MAX];
  logic [4:0] era_num;

  rs_syndrome dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .to_mont(to_mont), .alpha_m(alpha_m),
    .era_start(era_start), .start(start), .pass2(pass2), .in_valid(in_valid), .in_sym(in_sym),
    .in_era(in_era), .done(done), .syn(syn), .lo_zero(lo_zero), .era_val(era_val),
    .era_num(era_num), .era_ovf(era_ovf));

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

  task automatic feed(int r[256], bit e[256], int nn, bit p2);
    for (int i = 0; i < nn; i++) begin
      @(negedge clk);
      start = (i == 0); pass2 = p2; in_valid = 1; in_sym = 8'(r[nn - 1 - i]); in_era = e[nn - 1 - i];
    end
    @(negedge clk);
    start = 0; in_valid = 0; in_era = 0;
    chk(done == 1'b1, "done one cycle after the last symbol");
  endtask

  task automatic run(int mm, int pp, int nn, int nnk, int nera, bit clean);
    int r [256];
    bit e [256];
    int c [256];
    int msg [256];
    int full = pp | (1 << mm);
    int xm = apow(mm, full, mm);
    int cnt = 0;
    @(negedge clk);
    def = 1; m = 4'(mm); coe = 8'(pp); n = 8'(nn); nk = 6'(nnk);
    @(negedge clk);
    def = 0;
    while (busy) @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      msg[i] = $urandom & ((1 << mm) - 1);
      e[i] = 0;
    end
    if (clean) begin
      encode(msg, nn, nnk, full, mm, c);
      r = c;
    end else r = msg;
    for (int i = 0; i < nera; i++) e[$urandom_range(nn - 1)] = 1;
    feed(r, e, nn, 0);
    if (nnk > 16) feed(r, e, nn, 1);
    for (int i = 1; i <= nnk; i++)
      chk(int'(syn[i - 1]) == gmul(peval(r, nn, i, full, mm), xm, full, mm),
          $sformatf("m=%0d n=%0d S%0d=%h expected %h", mm, nn, i, syn[i - 1],
                    gmul(peval(r, nn, i, full, mm), xm, full, mm)));
    chk(lo_zero == clean, "lo_zero");
    for (int j = nn - 1; j >= 0; j--)
      if (e[j]) begin
        if (cnt < 16)
          chk(int'(era_val[cnt]) == gmul(apow(j, full, mm), xm, full, mm),
              $sformatf("erasure %0d at position %0d", cnt, j));
        cnt++;
      end
    chk(int'(era_num) == ((cnt > 16) ? 16 : cnt), "erasure count");
    chk(era_ovf == (cnt > 16), "erasure overflow");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(8, 'h1d, 255, 32, 5, 0);
    run(8, 'h1d, 255, 32, 0, 1);
    run(8, 'h2d, 204, 16, 12, 0);
    run(8, 'h1d, 62, 32, 30, 0);
    run(7, 'h09, 127, 6, 3, 0);
    run(4, 'h03, 15, 6, 2, 0);
    run(4, 'h03, 15, 6, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
