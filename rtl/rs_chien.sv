// rs_chien: Chien search and error-value evaluator.
//
// Tests every position j = n-1 .. 0 of the codeword, one per step, as a root
// X^-1 = alpha^-j of the errata locator Lambda(x), and computes the error value
// there by Forney's rule in the form
//   e_j = [ sum_k Omega_(k-1) X^-k ] / Lambda_odd(X^-1),   k = 1..16
// where Lambda_odd is the odd part of Lambda (X^-1 times its derivative).
//
// Evaluation follows the split of the document's eq. (4): a term register holds
// Lambda_i * alpha^(-ij) for i = 1..8, and for i = 9..16 it holds only
// Lambda_i * alpha^(-(i-8)j), with one shared factor register F = alpha^(-8j)
// that multiplies the sum of the upper terms. Every register steps by a
// multiplier constant alpha^1..alpha^8 only. Odd and even terms are summed
// apart, giving Lambda_odd and Lambda (zero test) as in the Chien block figure.
// The numerator uses the same scheme with its own 16 term registers.
//
// A load pulse takes lambda[], omega[] and ldeg and sets each register to
// coefficient * beta^i, beta = alpha^-(n-1), so that the first step is position
// n-1 (the first symbol out of the buffer). Each step cycle evaluates the
// current position: Lambda_odd addresses the inversion table (rs_inv_table,
// instantiated here), and one cycle later a uffm forms numerator * inverse and a
// second uffm takes it out of Montgomery form. err_valid/err_val/err_last follow
// each step by exactly 2 cycles; err_val is 0 where Lambda has no root. With
// err_last comes dec_fail: the number of roots found differs from ldeg, or a
// root had Lambda_odd = 0. The inputs are sampled at load only; they may
// change while the search runs.
module rs_chien
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  rs_cfg_t    cfg,
  input  gf_t        one_m,
  input  gf_t        alpha_m [NK_MAX],
  input  gf_t        beta_m  [8],
  // inversion table fill
  input  logic       inv_fill,
  output logic       inv_busy,
  // decode
  input  logic       load,
  input  gf_t        lambda [T_MAX+1],
  input  gf_t        omega  [T_MAX],
  input  logic [5:0] ldeg,
  input  logic       step,
  output logic       err_valid,
  output gf_t        err_val,
  output logic       err_last,
  output logic       dec_fail
);

  gf_t lo [8], up [8], wlo [8], wup [8];    // term registers
  gf_t lo_n [8], up_n [8], wlo_n [8], wup_n [8];
  gf_t l0, f, f_n;
  logic [7:0] cnt;

  // one uffm per term register: load multiplies by beta^i, step by alpha^i
  for (genvar i = 0; i < 8; i++) begin : g_cc
    uffm #(.D(GF_D)) u_lo  (.a(load ? lambda[i+1] : lo[i]),  .b(load ? beta_m[i] : alpha_m[i]), .p(cfg.p), .m(cfg.m), .s(lo_n[i]));
    uffm #(.D(GF_D)) u_up  (.a(load ? lambda[i+9] : up[i]),  .b(load ? beta_m[i] : alpha_m[i]), .p(cfg.p), .m(cfg.m), .s(up_n[i]));
    uffm #(.D(GF_D)) u_wlo (.a(load ? omega[i]    : wlo[i]), .b(load ? beta_m[i] : alpha_m[i]), .p(cfg.p), .m(cfg.m), .s(wlo_n[i]));
    uffm #(.D(GF_D)) u_wup (.a(load ? omega[i+8]  : wup[i]), .b(load ? beta_m[i] : alpha_m[i]), .p(cfg.p), .m(cfg.m), .s(wup_n[i]));
  end
  uffm #(.D(GF_D)) u_f (.a(f), .b(alpha_m[7]), .p(cfg.p), .m(cfg.m), .s(f_n));

  // sums of the current position
  gf_t lo_odd, lo_even, up_odd, up_even, wl, wu;
  gf_t f_upodd, f_upeven, f_wu;
  gf_t sig_odd, sig_all, wsum;
  always_comb begin
    lo_odd = '0; lo_even = '0; up_odd = '0; up_even = '0; wl = '0; wu = '0;
    for (int i = 0; i < 8; i++) begin
      // term i has power i+1 (lower) or i+9 (upper): odd when i is even
      if (i % 2 == 0) begin lo_odd  ^= lo[i]; up_odd  ^= up[i]; end
      else            begin lo_even ^= lo[i]; up_even ^= up[i]; end
      wl ^= wlo[i];
      wu ^= wup[i];
    end
  end
  uffm #(.D(GF_D)) u_fo (.a(f), .b(up_odd),  .p(cfg.p), .m(cfg.m), .s(f_upodd));
  uffm #(.D(GF_D)) u_fe (.a(f), .b(up_even), .p(cfg.p), .m(cfg.m), .s(f_upeven));
  uffm #(.D(GF_D)) u_fw (.a(f), .b(wu),      .p(cfg.p), .m(cfg.m), .s(f_wu));
  assign sig_odd = lo_odd ^ f_upodd;
  assign sig_all = sig_odd ^ l0 ^ lo_even ^ f_upeven;
  assign wsum    = wl ^ f_wu;

  // stage 1: inversion table lookup of Lambda_odd
  gf_t  inv;
  logic v1_valid, v1_root, v1_bad, v1_last;
  gf_t  v1_w;
  rs_inv_table u_inv (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .one_m(one_m),
    .fill(inv_fill), .busy(inv_busy),
    .rd_en(step), .rd_addr(sig_odd), .rd_data(inv)
  );

  // stage 2: Forney product and conversion to plain form
  gf_t e_m, e_p;
  uffm #(.D(GF_D)) u_fy (.a(v1_w), .b(inv),      .p(cfg.p), .m(cfg.m), .s(e_m));
  uffm #(.D(GF_D)) u_cv (.a(e_m),  .b(gf_t'(1)), .p(cfg.p), .m(cfg.m), .s(e_p));

  logic [5:0] roots, ldeg_q;
  logic       bad;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) begin
        lo[i] <= '0; up[i] <= '0; wlo[i] <= '0; wup[i] <= '0;
      end
      l0 <= '0; f <= '0; cnt <= '0;
      v1_valid <= 1'b0; v1_root <= 1'b0; v1_bad <= 1'b0; v1_last <= 1'b0; v1_w <= '0;
      err_valid <= 1'b0; err_val <= '0; err_last <= 1'b0; dec_fail <= 1'b0;
      roots <= '0; bad <= 1'b0; ldeg_q <= '0;
    end else begin
      if (load) begin
        for (int i = 0; i < 8; i++) begin
          lo[i] <= lo_n[i]; up[i] <= up_n[i]; wlo[i] <= wlo_n[i]; wup[i] <= wup_n[i];
        end
        l0    <= lambda[0];
        f     <= beta_m[7];
        cnt   <= '0;
        roots <= '0;
        bad   <= 1'b0;
        ldeg_q <= ldeg;
      end else if (step) begin
        for (int i = 0; i < 8; i++) begin
          lo[i] <= lo_n[i]; up[i] <= up_n[i]; wlo[i] <= wlo_n[i]; wup[i] <= wup_n[i];
        end
        f   <= f_n;
        cnt <= cnt + 1'b1;
      end
      // stage 1
      v1_valid <= step && !load;
      v1_root  <= (sig_all == '0);
      v1_bad   <= (sig_all == '0) && (sig_odd == '0);
      v1_last  <= step && !load && (cnt == cfg.n - 8'd1);
      v1_w     <= wsum;
      // stage 2
      err_valid <= v1_valid;
      err_last  <= v1_valid && v1_last;
      err_val   <= (v1_valid && v1_root) ? e_p : '0;
      if (v1_valid && v1_root) roots <= roots + 1'b1;
      if (v1_valid && v1_bad)  bad   <= 1'b1;
      if (v1_valid && v1_last)
        dec_fail <= bad || (v1_valid && v1_bad) ||
                    ((roots + 6'(v1_root)) != ldeg_q);
    end
  end

endmodule
