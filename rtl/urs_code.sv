// urs_code: universal Reed-Solomon error-and-erasure decoder.
//
// Decodes RS(n, k) codes over any field GF(2^m), m <= 8, given at run time by
// its primitive polynomial, with n <= 255 and up to n-k = 32 parity symbols:
// up to 16 errors without erasures, or any mix with 2*errors + erasures <=
// n-k and errors + erasures <= 16. The generator polynomial has the roots
// alpha^1 .. alpha^(n-k), alpha = x. All multiplications use one universal
// Montgomery multiplier design (uffm), so nothing in the datapath is fixed to a
// field.
//
// Four stages work on successive codewords:
//   1. syndrome and erasure-value calculator (rs_syndrome), one symbol per
//      cycle; for n-k > 16 a second pass over the buffered codeword computes
//      S17..S32, skipped when S1..S16 are all zero;
//   2. key-equation solver with erasure locator expansion (rs_kes);
//   3. Chien search and Forney error evaluator (rs_chien) with its on-the-fly
//      inversion table, in step with the codeword read back from
//   4. the two-bank codeword buffer (rs_fifo); the error value is XORed onto
//      each symbol on the way out.
// RS_Enable1 (rs_enable) lets RS_EN switch decoding off per codeword;
// RS_Enable2 keeps stages 2 and 3 idle for codewords whose syndromes are zero.
//
// Configuration: pulse rs_def with def_m, coe (p(x) without its x^m term),
// def_n and def_nk while the decoder is empty; cfg_busy stays high for about
// 2^m + 275 cycles while the field constants and the inversion table are made.
// Input: a codeword is n symbols, highest position first, each taken when
// rs_valid && rs_ready; the first carries rs_sync, era flags erased symbols.
// Output: the same symbols, corrected, with out_valid, out_sync on the first
// and out_err the error value applied; dec_done pulses with the last symbol,
// and dec_error then flags a codeword found uncorrectable.
// Rate and latency: one symbol per cycle within a codeword; between codewords
// rs_ready may drop while both buffer banks are in use. A burst of decoded
// (204,188) codewords runs at one codeword per about 217 cycles (the key
// equation takes about 215); for n-k > 16 the two syndrome passes set the
// period, about 2n. The first output symbol follows the last input symbol by
// the second pass (if any) + the key-equation time + about 4 cycles.
// Port names follow the document's block diagram where it gives them; the
// handshakes, the definition interface and the stage control are this design's.
module urs_code
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // field and code definition
  input  logic       rs_def,
  input  logic [7:0] coe,
  input  logic [3:0] def_m,
  input  logic [7:0] def_n,
  input  logic [5:0] def_nk,
  output logic       cfg_busy,
  // received codeword
  input  logic       rs_en,
  input  logic       rs_sync,
  input  logic       rs_valid,
  input  logic [7:0] rs_in,
  input  logic       era,
  output logic       rs_ready,
  // corrected codeword
  output logic       out_valid,
  output logic       out_sync,
  output logic [7:0] out_data,
  output logic [7:0] out_err,
  output logic       dec_done,
  output logic       dec_error
);

  // ---------------------------------------------------------------- config
  rs_cfg_t cfg;
  gf_t     one_m, to_mont, era_start;
  gf_t     alpha_m [NK_MAX];
  gf_t     beta_m  [8];
  logic    fcfg_busy, fcfg_busy_q, inv_fill, inv_busy;

  rs_field_cfg u_cfg (
    .clk(clk), .rst_n(rst_n), .def(rs_def), .coe(coe), .m(def_m), .n(def_n), .nk(def_nk),
    .cfg(cfg), .busy(fcfg_busy), .one_m(one_m), .to_mont(to_mont), .alpha_m(alpha_m),
    .era_start(era_start), .beta_m(beta_m)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) fcfg_busy_q <= 1'b0;
    else        fcfg_busy_q <= fcfg_busy;

  assign inv_fill = fcfg_busy_q && !fcfg_busy;
  assign cfg_busy = fcfg_busy || inv_fill || inv_busy;

  // ---------------------------------------------------------------- buffer
  logic       wr_en, ra_en, rb_en;
  logic       wr_bank, rb_bank;
  logic [8:0] wr_addr, ra_addr, rb_addr;
  gf_t        ra_data, rb_data;

  // ---------------------------------------------------------------- stage 1
  typedef enum logic [2:0] {S1_IDLE, S1_IN, S1_SYN, S1_P2, S1_WAIT} s1_t;
  s1_t        s1;
  logic       wbank;
  logic [1:0] bank_busy;
  logic [7:0] s1_cnt, cnt_nx;
  logic [7:0] p2_cnt;
  logic       p2_rd_v, p2_first;
  logic       accept, sym_first, en1, en1_eff, handoff;
  gf_t        sym_mask;

  // syndrome stage outputs
  logic       syn_done, lo_zero, era_ovf;
  gf_t        syn [NK_MAX];
  gf_t        era_val [T_MAX];
  logic [4:0] era_num;

  // stage 2 / 3 state used by stage 1
  logic       s2_full;

  assign rs_ready  = !cfg_busy && ((s1 == S1_IDLE && !bank_busy[wbank]) || s1 == S1_IN);
  assign accept    = rs_valid && rs_ready && (s1 == S1_IN || rs_sync);
  assign sym_first = accept && (s1 == S1_IDLE);
  assign en1_eff   = sym_first ? rs_en : en1;
  assign cnt_nx    = (sym_first ? 8'd0 : s1_cnt) + 8'd1;
  assign sym_mask  = gf_t'((9'd1 << cfg.m) - 9'd1);

  rs_enable u_en1 (.clk(clk), .rst_n(rst_n), .frame(sym_first), .en_in(rs_en), .skip(1'b0), .en(en1));

  assign wr_en   = accept;
  assign wr_bank = wbank;
  assign wr_addr = 9'(sym_first ? 8'd0 : s1_cnt);
  assign ra_en   = (s1 == S1_P2) && (p2_cnt < cfg.n);
  assign ra_addr = 9'(p2_cnt);
  assign handoff = (s1 == S1_WAIT) && !s2_full;

  // the syndrome stage sees the input during pass 1, the buffer during pass 2
  logic syn_start, syn_pass2, syn_valid, syn_era;
  gf_t  syn_sym;
  always_comb begin
    if (s1 == S1_P2) begin
      syn_start = p2_first;
      syn_pass2 = 1'b1;
      syn_valid = p2_rd_v;
      syn_sym   = ra_data & sym_mask;
      syn_era   = 1'b0;
    end else begin
      syn_start = sym_first;
      syn_pass2 = 1'b0;
      syn_valid = accept && en1_eff;
      syn_sym   = rs_in & sym_mask;
      syn_era   = era;
    end
  end

  rs_syndrome u_syn (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .to_mont(to_mont), .alpha_m(alpha_m),
    .era_start(era_start), .start(syn_start), .pass2(syn_pass2), .in_valid(syn_valid),
    .in_sym(syn_sym), .in_era(syn_era), .done(syn_done), .syn(syn), .lo_zero(lo_zero),
    .era_val(era_val), .era_num(era_num), .era_ovf(era_ovf)
  );

  logic s3_free_bank;    // stage 3 releases bank rb_bank this cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1        <= S1_IDLE;
      wbank     <= 1'b0;
      bank_busy <= '0;
      s1_cnt    <= '0;
      p2_cnt    <= '0;
      p2_rd_v   <= 1'b0;
      p2_first  <= 1'b0;
    end else begin
      p2_rd_v  <= ra_en;
      p2_first <= ra_en && (p2_cnt == 8'd0);
      if (s3_free_bank) bank_busy[rb_bank] <= 1'b0;
      if (sym_first)    bank_busy[wbank]   <= 1'b1;
      case (s1)
        S1_IDLE, S1_IN: if (accept) begin
          s1_cnt <= cnt_nx;
          if (cnt_nx == cfg.n) s1 <= en1_eff ? S1_SYN : S1_WAIT;
          else                 s1 <= S1_IN;
        end
        S1_SYN: if (syn_done) begin
          if (cfg.nk > 6'(NSC) && !lo_zero) begin
            s1     <= S1_P2;
            p2_cnt <= '0;
          end else begin
            s1 <= S1_WAIT;
          end
        end
        S1_P2: begin
          if (ra_en)    p2_cnt <= p2_cnt + 1'b1;
          if (syn_done) s1 <= S1_WAIT;
        end
        S1_WAIT: if (handoff) begin
          s1    <= S1_IDLE;
          wbank <= !wbank;
        end
        default: s1 <= S1_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- stage 2
  logic       en2, s2_bank, s2_kdone;
  logic       kes_done, kes_fail;
  gf_t        lambda [T_MAX+1];
  gf_t        omega  [T_MAX];
  logic [5:0] ldeg;
  logic       move;        // stage 2 -> stage 3
  logic       s3_idle;

  rs_enable u_en2 (.clk(clk), .rst_n(rst_n), .frame(handoff), .en_in(en1), .skip(lo_zero), .en(en2));

  rs_kes u_kes (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .one_m(one_m),
    .start(handoff && en1 && !lo_zero), .syn_in(syn), .era_in(era_val),
    .era_num(era_num), .era_ovf(era_ovf),
    .busy(), .done(kes_done), .lambda(lambda), .omega(omega), .ldeg(ldeg), .fail(kes_fail)
  );

  assign move = s2_full && (!en2 || s2_kdone) && s3_idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_full  <= 1'b0;
      s2_bank  <= 1'b0;
      s2_kdone <= 1'b0;
    end else begin
      if (kes_done) s2_kdone <= 1'b1;
      if (handoff) begin
        s2_full <= 1'b1;
        s2_bank <= wbank;
      end else if (move) begin
        s2_full  <= 1'b0;
        s2_kdone <= 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------- stage 3
  typedef enum logic [1:0] {S3_IDLE, S3_RUN, S3_DRAIN} s3_t;
  s3_t        s3;
  logic [7:0] rd_cnt;
  logic [1:0] drain;
  logic       s3_dec, s3_kfail;
  logic       step;
  logic       ch_valid, ch_last, ch_fail;
  gf_t        ch_err;
  logic       o1_valid, o1_first, o1_last;
  logic       o2_valid, o2_first, o2_last;
  gf_t        o2_data;

  assign s3_idle      = (s3 == S3_IDLE);
  assign rb_en        = (s3 == S3_RUN);
  assign rb_addr      = 9'(rd_cnt);
  assign step         = rb_en && s3_dec;
  assign s3_free_bank = rb_en && (rd_cnt == cfg.n - 8'd1);

  rs_chien u_chien (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .one_m(one_m), .alpha_m(alpha_m), .beta_m(beta_m),
    .inv_fill(inv_fill), .inv_busy(inv_busy),
    .load(move && en2), .lambda(lambda), .omega(omega), .ldeg(ldeg), .step(step),
    .err_valid(ch_valid), .err_val(ch_err), .err_last(ch_last), .dec_fail(ch_fail)
  );

  rs_fifo #(.BANK_DEPTH(512), .W(8)) u_fifo (
    .clk(clk),
    .wr_en(wr_en), .wr_bank(wr_bank), .wr_addr(wr_addr), .wr_data(rs_in),
    .ra_en(ra_en), .ra_bank(wbank), .ra_addr(ra_addr), .ra_data(ra_data),
    .rb_en(rb_en), .rb_bank(rb_bank), .rb_addr(rb_addr), .rb_data(rb_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3 <= S3_IDLE; rd_cnt <= '0; drain <= '0;
      rb_bank <= 1'b0; s3_dec <= 1'b0; s3_kfail <= 1'b0;
      o1_valid <= 1'b0; o1_first <= 1'b0; o1_last <= 1'b0;
      o2_valid <= 1'b0; o2_first <= 1'b0; o2_last <= 1'b0; o2_data <= '0;
    end else begin
      case (s3)
        S3_IDLE: if (move) begin
          s3       <= S3_RUN;
          rd_cnt   <= '0;
          rb_bank  <= s2_bank;
          s3_dec   <= en2;
          s3_kfail <= en2 && kes_fail;
        end
        S3_RUN: begin
          rd_cnt <= rd_cnt + 1'b1;
          if (rd_cnt == cfg.n - 8'd1) begin
            s3    <= S3_DRAIN;
            drain <= 2'd2;
          end
        end
        S3_DRAIN: begin
          drain <= drain - 1'b1;
          if (drain == 2'd1) s3 <= S3_IDLE;
        end
        default: s3 <= S3_IDLE;
      endcase
      o1_valid <= rb_en;
      o1_first <= rb_en && (rd_cnt == 8'd0);
      o1_last  <= s3_free_bank;
      o2_valid <= o1_valid;
      o2_first <= o1_first;
      o2_last  <= o1_last;
      o2_data  <= rb_data;
    end
  end

  // the Chien result of a symbol arrives together with its buffered copy
  logic apply;
  assign apply     = s3_dec && !s3_kfail && ch_valid;
  assign out_valid = o2_valid;
  assign out_sync  = o2_first;
  assign out_err   = apply ? ch_err : '0;
  assign out_data  = o2_data ^ out_err;
  assign dec_done  = o2_valid && o2_last;
  assign dec_error = dec_done && s3_dec && (s3_kfail || (ch_last && ch_fail));

  a_chien_aligned: assert property (@(posedge clk)
    (rst_n && s3_dec && o2_valid) |-> ch_valid)
    else $error("urs_code: Chien result out of step with the buffer");

endmodule
