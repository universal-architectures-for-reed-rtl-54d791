// rs_syndrome: syndrome and erasure-value calculator.
//
// Receives the n symbols of a codeword, highest position first (R_{n-1} ...
// R_0), one per cycle when in_valid is high. Each symbol is brought into
// Montgomery form by one uffm (times x^2m), and NSC = 16 syndrome cells evaluate
// the received polynomial by Horner's rule, S_i <- S_i * alpha^i + R_j, each with
// one constant multiplier whose constant is alpha_m[i] from the field
// configuration. A pass computes 16 syndromes; start marks the first symbol of
// a pass (it comes with in_valid) and starts the cells from zero: pass2 = 0 for
// S1..S16, pass2 = 1 (the codeword fed again from the buffer) for S17..S32,
// which is only needed when n-k > 16. At the n-th symbol of a pass the cells
// are copied into syn[] and done pulses one cycle later.
//
// During the first pass the erasure-value calculator tracks the locator of the
// current position, alpha^j (starting at alpha^(n-1), one multiply by x^-1 per
// symbol), and stores it in era_val[] whenever in_era flags the symbol. Up to
// T_MAX = 16 erasures are kept; more sets era_ovf.
//
// lo_zero is high when S_1 .. S_min(n-k,16) are all zero, that is, when the
// first pass alone shows a codeword free of errors. All outputs are in
// Montgomery form. The structure (two groups of cells per pass, the second pass
// for t > 8, erasure registers) follows the document; the cell count per pass,
// the constant multipliers built as uffm with a register constant and the
// control are this design's choices.
module rs_syndrome
  import rs_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  rs_cfg_t  cfg,
  input  gf_t      to_mont,
  input  gf_t      alpha_m [NK_MAX],
  input  gf_t      era_start,
  input  logic     start,
  input  logic     pass2,
  input  logic     in_valid,
  input  gf_t      in_sym,
  input  logic     in_era,
  output logic     done,
  output gf_t      syn [NK_MAX],
  output logic     lo_zero,
  output gf_t      era_val [T_MAX],
  output logic [4:0] era_num,
  output logic     era_ovf
);

  gf_t        acc  [NSC];
  gf_t        accn [NSC];
  gf_t        prod [NSC];
  gf_t        r_m;
  gf_t        loc;
  logic       p2;
  logic [7:0] cnt;
  logic       last;
  gf_t        acc_e [NSC];   // cell contents seen by this symbol
  logic       p2_e;
  logic [7:0] cnt_e;
  gf_t        loc_e;
  logic [4:0] num_e;

  assign p2_e  = start ? pass2 : p2;
  assign cnt_e = start ? '0 : cnt;
  assign loc_e = (start && !pass2) ? era_start : loc;
  assign num_e = (start && !pass2) ? '0 : era_num;
  for (genvar i = 0; i < NSC; i++) begin : g_acc
    assign acc_e[i] = start ? '0 : acc[i];
  end

  uffm #(.D(GF_D)) u_conv (.a(in_sym), .b(to_mont), .p(cfg.p), .m(cfg.m), .s(r_m));

  for (genvar i = 0; i < NSC; i++) begin : g_sc
    uffm #(.D(GF_D)) u_sc (.a(acc_e[i]), .b(alpha_m[p2_e ? i + NSC : i]), .p(cfg.p), .m(cfg.m), .s(prod[i]));
    assign accn[i] = prod[i] ^ r_m;
  end

  assign last = in_valid && (cnt_e == cfg.n - 8'd1);

  always_comb begin
    lo_zero = 1'b1;
    for (int i = 0; i < NSC; i++)
      if (i < int'(cfg.nk) && syn[i] != '0) lo_zero = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSC; i++)    acc[i]     <= '0;
      for (int i = 0; i < NK_MAX; i++) syn[i]     <= '0;
      for (int i = 0; i < T_MAX; i++)  era_val[i] <= '0;
      era_num <= '0;
      era_ovf <= 1'b0;
      loc     <= '0;
      p2      <= 1'b0;
      cnt     <= '0;
      done    <= 1'b0;
    end else begin
      done <= last;
      if (in_valid) begin
        for (int i = 0; i < NSC; i++) acc[i] <= accn[i];
        p2  <= p2_e;
        cnt <= cnt_e + 1'b1;
        if (last)
          for (int i = 0; i < NSC; i++) syn[p2_e ? i + NSC : i] <= accn[i];
        if (!p2_e) begin
          loc     <= xdiv(loc_e, cfg.p);
          era_num <= num_e;
          if (start) era_ovf <= 1'b0;
          if (in_era) begin
            if (num_e < 5'(T_MAX)) begin
              era_val[num_e[3:0]] <= loc_e;
              era_num <= num_e + 1'b1;
            end else begin
              era_ovf <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
