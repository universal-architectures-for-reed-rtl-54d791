// rs_field_cfg: field-definition register and constant generator.
//
// On a def pulse it latches the code (n, n-k) and the field (degree m and the
// low coefficients coe of the primitive polynomial; the x^m term is implied) and
// then derives every field constant the decoder needs, all as powers of alpha = x:
//   one_m      = x^m             Montgomery form of 1
//   to_mont    = x^2m            multiplying a plain symbol by it in the
//                                Montgomery multiplier gives its Montgomery form
//   alpha_m[i] = x^(i+1+m)       Montgomery form of alpha^(i+1), i = 0..31, the
//                                syndrome and Chien step constants
//   era_start  = x^(n-1+m)       Montgomery form of alpha^(n-1), locator of the
//                                first received symbol
//   beta_m[i]  = (alpha^-(n-1))^(i+1) in Montgomery form, i = 0..7, the Chien
//                start factors
// A single "universal alpha generator" (multiply by x and reduce) walks x^k for
// k = 0..263, capturing each constant as k passes its exponent; then one uffm
// raises beta to the powers 2..8. busy is high from def until all constants are
// valid, about 272 cycles. The document names the correction factor and the COE
// input; the way the constants are produced is this design's own.
module rs_field_cfg
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       def,
  input  logic [7:0] coe,
  input  logic [3:0] m,
  input  logic [7:0] n,
  input  logic [5:0] nk,
  output rs_cfg_t    cfg,
  output logic       busy,
  output gf_t        one_m,
  output gf_t        to_mont,
  output gf_t        alpha_m [NK_MAX],
  output gf_t        era_start,
  output gf_t        beta_m [8]
);

  localparam int KLAST = 263;

  typedef enum logic [1:0] {IDLE, WALK, POWS} state_t;
  state_t     state;
  logic [8:0] k;
  gf_t        v;
  logic [2:0] pi;
  gf_t        prod;
  logic [8:0] e_era, e_beta, e_m, e_2m;

  assign e_m    = 9'(cfg.m);
  assign e_2m   = 9'(cfg.m) << 1;
  assign e_era  = 9'(cfg.n) - 9'd1 + 9'(cfg.m);
  assign e_beta = (9'd1 << cfg.m) - 9'(cfg.n) + 9'(cfg.m);

  uffm #(.D(GF_D)) u_pow (.a(beta_m[pi-1]), .b(beta_m[0]), .p(cfg.p), .m(cfg.m), .s(prod));

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      cfg       <= '{m: 4'd8, p: 9'h11d, n: 8'd255, nk: 6'd32};
      k         <= '0;
      v         <= '0;
      pi        <= '0;
      one_m     <= '0;
      to_mont   <= '0;
      era_start <= '0;
      for (int i = 0; i < NK_MAX; i++) alpha_m[i] <= '0;
      for (int i = 0; i < 8; i++)      beta_m[i]  <= '0;
    end else begin
      case (state)
        IDLE: if (def) begin
          cfg.m  <= m;
          cfg.p  <= (poly_t'(1) << m) | (poly_t'(coe) & ((poly_t'(1) << m) - 1'b1));
          cfg.n  <= n;
          cfg.nk <= nk;
          k      <= '0;
          v      <= gf_t'(1);
          state  <= WALK;
        end
        WALK: begin
          // v = x^k mod p(x)
          if (k == e_m)    one_m     <= v;
          if (k == e_2m)   to_mont   <= v;
          if (k == e_era)  era_start <= v;
          if (k == e_beta) beta_m[0] <= v;
          for (int i = 0; i < NK_MAX; i++)
            if (k == e_m + 9'(i + 1)) alpha_m[i] <= v;
          v <= xtime(v, cfg.p, cfg.m);
          k <= k + 1'b1;
          if (k == 9'(KLAST)) begin
            state <= POWS;
            pi    <= 3'd1;
          end
        end
        POWS: begin
          beta_m[pi] <= prod;
          pi <= pi + 1'b1;
          if (pi == 3'd7) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
