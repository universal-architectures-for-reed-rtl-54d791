// rs_kes: erasure locator expansion and key-equation solver.
//
// Runs the inversion-free Berlekamp-Massey algorithm for errors and erasures on
// the syndromes S_1..S_N (N = n-k) and the erasure locators Z_0..Z_{s-1} that
// the syndrome stage delivers, and then forms the errata evaluator
// Omega(x) = S(x) Lambda(x) mod x^N, S(x) = S_1 + S_2 x + ...
//
// The datapath is the decomposed serial form with three uffm multipliers: every
// pass walks the coefficient index j = 0..16, one coefficient per cycle, and
//   Lambda_j <- gamma * Lambda_j + delta * A_j          (multipliers 1 and 2)
//   delta_next += Lambda_j(new) * S_(r+1-j)              (multiplier 3)
// where A(x) holds x*B(x), the shifted correction polynomial. Erasure expansion
// uses the same step with gamma = 1, delta = Z_k and A = x*Lambda, which gives
// Lambda <- (1 + Z_k x) Lambda without extra multipliers. Passes:
//   pass 0          gamma = 1, delta = 0 (only computes the first discrepancy)
//   pass 1..s       erasure expansion with Z_(pass-1); after it L = s, B = Lambda
//   pass r = s+1..N Berlekamp-Massey step; if delta != 0 and 2L <= r+s-1 then
//                   L <- r+s-L, B <- Lambda(old), gamma <- delta, else B <- x*B
// Then short passes form Omega_i = sum_(j<=min(i,L)) Lambda_j S_(i+1-j),
// i = 0..min(N,16)-1, with multiplier 3. A pass only walks the indices that can
// be nonzero: up to p+1 in erasure pass p and up to max(L, r+s-L)+1 (at most
// 16) in BM pass r, so the time follows the pattern: about 215 cycles for 8
// errors with N = 16, about 475 for 16 errors with N = 32, never more than
// 33*17 + 136 + 2 = 699 cycles from start to done.
//
// Interface: start (one cycle) copies the syndromes and erasure values, busy is
// high while solving, done pulses once when lambda[], omega[] and ldeg are
// valid; they hold until the next start. fail flags an uncorrectable pattern
// found here: too many erasures (s > N or more than 16) or deg Lambda > 16.
// Values are in Montgomery form; Lambda and Omega carry the same nonzero scale
// factor, which cancels in the error value. The algorithm and the three-
// multiplier structure follow the document; the pass schedule, the "else
// B <- xB" branch and the Omega passes are this design's reading of it.
module rs_kes
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  rs_cfg_t    cfg,
  input  gf_t        one_m,
  input  logic       start,
  input  gf_t        syn_in [NK_MAX],
  input  gf_t        era_in [T_MAX],
  input  logic [4:0] era_num,
  input  logic       era_ovf,
  output logic       busy,
  output logic       done,
  output gf_t        lambda [T_MAX+1],
  output gf_t        omega  [T_MAX],
  output logic [5:0] ldeg,
  output logic       fail
);

  typedef enum logic [1:0] {IDLE, PASS, OMEGA} state_t;
  state_t     state;

  gf_t        s_r [NK_MAX];
  gf_t        z_r [T_MAX];
  logic [4:0] s_num;
  gf_t        a_r [T_MAX+1];
  gf_t        gam, dlt, dacc;
  logic [5:0] pass;          // 0 .. N
  logic [4:0] j;             // coefficient index 0 .. 16
  logic [4:0] oi;            // Omega index 0 .. 15
  gf_t        prev_new, prev_lam, prev_a;
  logic       cond;
  logic [4:0] jend;          // last coefficient index of this pass
  logic [4:0] jend_nx;       // ... of the next pass
  logic [4:0] oend;          // last Omega index
  logic [4:0] ojend;         // last term of the current Omega sum

  // pass decode
  logic       era_pass;
  gf_t        gm, dm;
  logic [6:0] rnext;
  assign era_pass = (pass <= 6'(s_num));

  // errata locator length after the current pass
  logic [5:0] l_next;
  always_comb begin
    l_next = ldeg;
    if (era_pass && pass == 6'(s_num)) l_next = 6'(s_num);
    else if (!era_pass && cond)        l_next = pass + 6'(s_num) - ldeg;
  end
  assign gm       = era_pass ? one_m : gam;
  assign dm       = era_pass ? ((pass == 6'd0) ? gf_t'(0) : z_r[pass[3:0] - 4'd1]) : dlt;
  assign rnext    = era_pass ? 7'(s_num) + 7'd1 : 7'(pass) + 7'd1;

  // Pass length: only coefficients up to the largest possible degree are
  // walked. After erasure pass p, Lambda has degree p and A = x*Lambda degree
  // p+1; in Berlekamp-Massey pass r neither Lambda nor A can exceed degree
  // max(L, r+s-L) + 1. Indices above stay zero.
  logic [6:0] rs_sum, other;
  always_comb begin
    if (7'(pass) + 7'd1 <= 7'(s_num)) begin
      jend_nx = (pass + 6'd2 > 6'(T_MAX)) ? 5'(T_MAX) : 5'(pass + 6'd2);
      rs_sum  = '0;
      other   = '0;
    end else begin
      rs_sum  = 7'(pass) + 7'd1 + 7'(s_num);
      other   = (rs_sum > 7'(l_next)) ? rs_sum - 7'(l_next) : 7'd0;
      other   = ((other > 7'(l_next)) ? other : 7'(l_next)) + 7'd1;
      jend_nx = (other > 7'(T_MAX)) ? 5'(T_MAX) : 5'(other);
    end
  end
  assign oend  = (cfg.nk > 6'(T_MAX)) ? 5'(T_MAX - 1) : 5'(cfg.nk - 6'd1);
  assign ojend = (6'(oi) < ldeg) ? oi : 5'(ldeg);

  // the three multipliers
  gf_t        p_gl, p_da, p_ds, newc, m3a, m3b;
  logic [6:0] sidx;      // 1-based syndrome index
  logic       svalid;
  uffm #(.D(GF_D)) u_gl (.a(gm), .b(lambda[j]), .p(cfg.p), .m(cfg.m), .s(p_gl));
  uffm #(.D(GF_D)) u_da (.a(dm), .b(a_r[j]),    .p(cfg.p), .m(cfg.m), .s(p_da));
  uffm #(.D(GF_D)) u_ds (.a(m3a), .b(m3b),      .p(cfg.p), .m(cfg.m), .s(p_ds));
  assign newc = p_gl ^ p_da;

  always_comb begin
    if (state == OMEGA) begin
      sidx = 7'(oi) + 7'd1 - 7'(j);
      m3a  = lambda[j];
    end else begin
      sidx = rnext - 7'(j);
      m3a  = newc;
    end
    svalid = (sidx >= 7'd1) && (sidx <= 7'(cfg.nk));
    m3b    = svalid ? s_r[5'(sidx - 7'd1)] : '0;
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      for (int i = 0; i < NK_MAX; i++) s_r[i] <= '0;
      for (int i = 0; i < T_MAX; i++) begin
        z_r[i]   <= '0;
        omega[i] <= '0;
      end
      for (int i = 0; i <= T_MAX; i++) begin
        a_r[i]    <= '0;
        lambda[i] <= '0;
      end
      jend <= '0;
      s_num <= '0; gam <= '0; dlt <= '0; dacc <= '0;
      pass <= '0; j <= '0; oi <= '0;
      prev_new <= '0; prev_lam <= '0; prev_a <= '0; cond <= 1'b0;
      ldeg <= '0; fail <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          for (int i = 0; i < NK_MAX; i++) s_r[i] <= syn_in[i];
          for (int i = 0; i < T_MAX; i++)  z_r[i] <= era_in[i];
          for (int i = 0; i <= T_MAX; i++) begin
            lambda[i] <= (i == 0) ? one_m : '0;
            a_r[i]    <= (i == 1) ? one_m : '0;   // A = x * B, B = 1
          end
          s_num <= era_num;
          gam   <= one_m;
          dlt   <= '0;
          dacc  <= '0;
          pass  <= '0;
          j     <= '0;
          jend  <= 5'd1;
          for (int i = 0; i < T_MAX; i++) omega[i] <= '0;
          cond  <= 1'b0;
          ldeg  <= '0;
          fail  <= 1'b0;
          if (era_ovf || 6'(era_num) > cfg.nk) begin
            fail  <= 1'b1;
            done  <= 1'b1;
          end else begin
            state <= PASS;
          end
        end

        PASS: begin
          lambda[j] <= newc;
          if (era_pass)   a_r[j] <= (j == 0) ? '0 : prev_new;
          else if (cond)  a_r[j] <= (j == 0) ? '0 : prev_lam;
          else            a_r[j] <= (j == 0) ? '0 : prev_a;
          prev_new <= newc;
          prev_lam <= lambda[j];
          prev_a   <= a_r[j];
          if (j == jend) begin
            j    <= '0;
            dlt  <= dacc ^ p_ds;
            dacc <= '0;
            ldeg <= l_next;
            if (!era_pass && cond) gam <= dlt;
            if (pass == cfg.nk) begin
              state <= OMEGA;
              oi    <= '0;
            end else begin
              pass <= pass + 1'b1;
              jend <= jend_nx;
              // length-change decision for the next (Berlekamp-Massey) pass
              cond <= ((dacc ^ p_ds) != '0) && ({1'b0, l_next, 1'b0} <= 8'(pass) + 8'(s_num));
            end
          end else begin
            j    <= j + 1'b1;
            dacc <= dacc ^ p_ds;
          end
        end

        OMEGA: begin
          if (j == ojend) begin
            omega[oi[3:0]] <= (6'(oi) < cfg.nk) ? (dacc ^ p_ds) : '0;
            dacc <= '0;
            j    <= '0;
            oi   <= oi + 1'b1;
            if (oi == oend) begin
              state <= IDLE;
              done  <= 1'b1;
              fail  <= (ldeg > 6'(T_MAX));
            end
          end else begin
            dacc <= dacc ^ p_ds;
            j    <= j + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
