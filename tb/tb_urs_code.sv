// tb_urs_code: end-to-end test of the universal RS decoder at its default size.
//
// For a list of codes (field degree, primitive polynomial, n, n-k, including the
// codes of the DVB-T / ITU J.83 A-D, Blu-ray LDC/BIS families that fit m <= 8)
// it defines the code, encodes random messages with an independent reference
// encoder, adds errors and erasures and streams the codewords in back to back.
// Every output codeword is compared with what was sent: the original codeword
// when it is correctable, the received word when decoding is switched off, and
// dec_error is checked for patterns that must be reported. It also checks that
// the input takes one symbol per cycle within a codeword, and counts the
// mechanisms of the design (second syndrome pass, its early termination, the
// no-error bypass, RS_EN bypass, erasure expansion, erasure overflow, input
// stalls, field changes); one that never happened counts as a failure. Bursts
// of decoded codewords check the sustained rate: a (204,188) codeword at most
// every 230 cycles, a (255,223) codeword at most every 2n + 10 cycles.
`timescale 1ns/1ps
module tb_urs_code;
  import tb_gf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic       rs_def = 1'b0, rs_en = 1'b1, rs_sync = 1'b0, rs_valid = 1'b0, era = 1'b0;
  logic [7:0] coe = '0, def_n = '0, rs_in = '0;
  logic [3:0] def_m = '0;
  logic [5:0] def_nk = '0;
  logic       cfg_busy, rs_ready, out_valid, out_sync, dec_done, dec_error;
  logic [7:0] out_data, out_err;

  urs_code dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int WATCHDOG = 400000;
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ expected frames
  localparam int MAXF = 64;
  typedef enum int {K_OK, K_BYPASS, K_MUSTFAIL, K_BEYOND} kind_t;
  int    exp_c   [MAXF][256];
  int    exp_n   [MAXF];
  kind_t exp_k   [MAXF];
  int    nsent = 0, nrecv = 0;

  // ------------------------------------------------ mechanism counters
  int c_pass2 = 0, c_early = 0, c_noerr = 0, c_bypass = 0, c_era = 0, c_eraovf = 0;
  int c_stall = 0, c_fields = 0, c_corr = 0, c_fail_seen = 0;

  always @(posedge clk) begin
    if (dut.s1 == dut.S1_SYN && dut.syn_done) begin
      if (dut.cfg.nk > 16 && dut.lo_zero) c_early++;
      if (dut.cfg.nk > 16 && !dut.lo_zero) c_pass2++;
    end
    if (dut.handoff && dut.en1 && dut.lo_zero) c_noerr++;
    if (dut.handoff && !dut.en1) c_bypass++;
    if (dut.handoff && dut.en1 && !dut.lo_zero && dut.era_num != 0) c_era++;
    if (dut.handoff && dut.era_ovf && dut.en1) c_eraovf++;
    if (rs_valid && !rs_ready && !cfg_busy && dut.s1 == dut.S1_IDLE) c_stall++;
    if (out_valid && out_err != 0) c_corr++;
  end

  // one symbol per cycle inside a codeword
  int first_acc, last_acc;
  always @(posedge clk) begin
    if (dut.sym_first) first_acc <= cycle;
    if (dut.accept && dut.cnt_nx == dut.cfg.n) begin
      checks++;
      if (cycle - (dut.sym_first ? cycle : first_acc) != int'(dut.cfg.n) - 1) begin
        failures++;
        $display("input rate: codeword took %0d cycles for n=%0d",
                 cycle - first_acc + 1, dut.cfg.n);
      end
    end
  end

  // codeword period in a burst of decoded codewords
  int last_done = -1, period = 0;
  always @(posedge clk) if (dec_done) begin
    if (last_done >= 0) period = cycle - last_done;
    last_done = cycle;
  end

  // ------------------------------------------------ output monitor
  int got [256];
  int oi = 0;
  always @(posedge clk) begin
    if (out_valid) begin
      if (out_sync) oi = 0;
      got[exp_n[nrecv] - 1 - oi] = out_data;
      oi++;
      if (dec_done) begin
        automatic int n = exp_n[nrecv];
        automatic int bad = 0;
        for (int j = 0; j < n; j++) if (got[j] != exp_c[nrecv][j]) bad++;
        if (dec_error) c_fail_seen++;
        checks++;
        case (exp_k[nrecv])
          K_OK, K_BYPASS: if (bad != 0 || dec_error || oi != n) begin
            failures++;
            $display("frame %0d: %0d wrong symbols, dec_error=%0d, %0d symbols out",
                     nrecv, bad, dec_error, oi);
          end
          K_MUSTFAIL: if (!dec_error) begin
            failures++;
            $display("frame %0d: uncorrectable pattern not flagged", nrecv);
          end
          default: if (bad == 0 && !dec_error) begin
            failures++;
            $display("frame %0d: pattern beyond capability came out clean", nrecv);
          end
        endcase
        nrecv++;
      end
    end
  end

  // ------------------------------------------------ stimulus
  int cm, cp, cn, cnk;

  task automatic define(int m, int p, int n, int nk);
    @(negedge clk);
    rs_def = 1'b1; def_m = 4'(m); coe = 8'(p); def_n = 8'(n); def_nk = 6'(nk);
    @(negedge clk);
    rs_def = 1'b0;
    @(negedge clk);
    while (cfg_busy) @(negedge clk);
    cm = m; cp = p | (1 << m); cn = n; cnk = nk;
    c_fields++;
  endtask

  task automatic send(int nerr, int nera, bit en, kind_t kind);
    int msg [256];
    int c [256];
    int r [256];
    bit e [256];
    bit used [256];
    int pos;
    for (int i = 0; i < 256; i++) begin
      msg[i] = $urandom & ((1 << cm) - 1);
      e[i] = 1'b0;
      used[i] = 1'b0;
    end
    encode(msg, cn, cnk, cp, cm, c);
    // reference self-check: a codeword has zero syndromes
    for (int i = 1; i <= cnk; i++) begin
      checks++;
      if (peval(c, cn, i, cp, cm) != 0) begin
        failures++;
        $display("reference encoder: S%0d != 0", i);
      end
    end
    r = c;
    for (int i = 0; i < nerr; i++) begin
      do pos = $urandom_range(cn - 1); while (used[pos]);
      used[pos] = 1'b1;
      r[pos] = c[pos] ^ (1 + $urandom_range((1 << cm) - 2));
    end
    for (int i = 0; i < nera; i++) begin
      do pos = $urandom_range(cn - 1); while (used[pos]);
      used[pos] = 1'b1;
      e[pos] = 1'b1;
      r[pos] = $urandom & ((1 << cm) - 1);
    end
    exp_n[nsent] = cn;
    exp_k[nsent] = kind;
    for (int j = 0; j < 256; j++) exp_c[nsent][j] = (kind == K_BYPASS) ? r[j] : c[j];
    nsent++;
    for (int i = 0; i < cn; i++) begin
      @(negedge clk);
      rs_valid = 1'b1;
      rs_sync  = (i == 0);
      rs_en    = en;
      rs_in    = 8'(r[cn - 1 - i]);
      era      = e[cn - 1 - i];
      while (!rs_ready) @(negedge clk);
    end
    @(negedge clk);
    rs_valid = 1'b0;
    rs_sync  = 1'b0;
    era      = 1'b0;
  endtask

  task automatic drain();
    int t = 0;
    while (nrecv < nsent && t < 20000) begin
      @(negedge clk);
      t++;
    end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    // t = 16, the largest code (Blu-ray LDC family, full length)
    define(8, 'h1d, 255, 32);
    send(0, 0, 1, K_OK);           // clean: early termination
    send(16, 0, 1, K_OK);          // 16 errors
    send(0, 16, 1, K_OK);          // 16 erasures
    send(5, 6, 1, K_OK);           // errors and erasures
    send(10, 6, 1, K_OK);
    send(3, 17, 1, K_MUSTFAIL);    // more erasures than held
    send(8, 0, 0, K_BYPASS);       // RS_EN low
    send(17, 0, 1, K_BEYOND);
    drain();
    for (int i = 0; i < 4; i++) send(16, 0, 1, K_OK);
    drain();
    $display("(255,223) codeword period in a burst: %0d cycles", period);
    // n-k > 16: the two syndrome passes (2n cycles) set the period
    checks++;
    if (period > 2 * 255 + 10) begin
      failures++;
      $display("(255,223) period above 2n + 10");
    end

    // Blu-ray LDC (248,216) and BIS (62,30)
    define(8, 'h1d, 248, 32);
    send(16, 0, 1, K_OK);
    send(7, 9, 1, K_OK);
    drain();
    define(8, 'h1d, 62, 32);
    send(16, 0, 1, K_OK);
    send(0, 0, 1, K_OK);
    send(2, 12, 1, K_OK);
    drain();

    // DVB-T / J.83 A,B (204,188), t = 8, another primitive polynomial
    define(8, 'h2d, 204, 16);
    send(8, 0, 1, K_OK);
    send(4, 8, 1, K_OK);
    send(0, 0, 1, K_OK);
    send(0, 16, 1, K_OK);
    send(2, 0, 0, K_BYPASS);
    drain();

    // sustained rate: a burst of four decoded (204,188) codewords must come
    // out close to one symbol per cycle
    for (int i = 0; i < 4; i++) send(8, 0, 1, K_OK);
    drain();
    checks++;
    $display("(204,188) codeword period in a burst: %0d cycles", period);
    if (period > 230 || period < 204) begin
      failures++;
      $display("period out of the expected range");
    end

    // J.83 D (207,187), t = 10: second pass with S17..S20
    define(8, 'h1d, 207, 20);
    send(10, 0, 1, K_OK);
    send(3, 10, 1, K_OK);
    drain();

    // J.83 C (128,122) over GF(2^7), t = 3
    define(7, 'h09, 127, 6);
    send(3, 0, 1, K_OK);
    send(1, 4, 1, K_OK);
    drain();

    // small fields
    define(4, 'h03, 15, 6);
    send(3, 0, 1, K_OK);
    send(1, 3, 1, K_OK);
    drain();
    define(6, 'h03, 63, 10);
    send(5, 0, 1, K_OK);
    send(2, 5, 1, K_OK);
    drain();

    checks++;
    if (nrecv != nsent) begin
      failures++;
      $display("%0d codewords sent, %0d came out", nsent, nrecv);
    end

    $display("mechanisms: pass2=%0d early_stop=%0d no_error=%0d rs_en_off=%0d erasures=%0d era_overflow=%0d stalls=%0d fields=%0d corrected_symbols=%0d flagged=%0d",
             c_pass2, c_early, c_noerr, c_bypass, c_era, c_eraovf, c_stall, c_fields, c_corr, c_fail_seen);
    checks += 8;
    if (c_pass2 == 0)  begin failures++; $display("no second syndrome pass"); end
    if (c_early == 0)  begin failures++; $display("no early termination"); end
    if (c_noerr == 0)  begin failures++; $display("no no-error bypass"); end
    if (c_bypass == 0) begin failures++; $display("no RS_EN bypass"); end
    if (c_era == 0)    begin failures++; $display("no erasure decoding"); end
    if (c_eraovf == 0) begin failures++; $display("no erasure overflow"); end
    if (c_stall == 0)  begin failures++; $display("no input stall"); end
    if (c_corr == 0)   begin failures++; $display("no corrections"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
