// rs_inv_table: on-the-fly finite-field inversion table.
//
// A 2^D x D RAM that maps a nonzero field element V (Montgomery form) to its
// inverse V^-1 (Montgomery form), for whatever field is configured. It is built
// rather than stored: after a fill pulse a universal alpha generator walks
// A = alpha^k (multiply by x and reduce) and a universal alpha^-1 generator
// walks B = alpha^-k (multiply by x^-1 and reduce), both starting at the
// Montgomery one, and the RAM is written mem[A] = B for k = 0 .. 2^m-2, after a
// first write of mem[0] = 0. An address multiplexer gives the generators the RAM
// during the fill and the error evaluator (Lambda_odd) afterwards. busy is high
// for the 2^m cycles of the fill; a lookup presented on rd_addr returns rd_data
// on the next cycle.
//
// The table, its two generators and the address multiplexer follow the
// document. Filling right after a field definition (instead of during the first
// syndrome pass) is this design's choice: the table then depends only on the
// field and is ready for every codeword.
module rs_inv_table
  import rs_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  rs_cfg_t cfg,
  input  gf_t     one_m,
  input  logic    fill,
  output logic    busy,
  input  logic    rd_en,
  input  gf_t     rd_addr,
  output gf_t     rd_data
);

  gf_t        ga, gb;        // alpha and alpha^-1 generators
  logic [8:0] cnt;
  logic       zero_wr;
  gf_t        addr;

  assign addr = busy ? (zero_wr ? '0 : ga) : rd_addr;

  rs_sram #(.DEPTH(1 << GF_D), .W(GF_D)) u_ram (
    .clk  (clk),
    .en   (busy | rd_en),
    .we   (busy),
    .addr (addr),
    .wdata(zero_wr ? '0 : gb),
    .rdata(rd_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      zero_wr <= 1'b0;
      cnt     <= '0;
      ga      <= '0;
      gb      <= '0;
    end else if (fill) begin
      busy    <= 1'b1;
      zero_wr <= 1'b1;
      cnt     <= '0;
      ga      <= one_m;
      gb      <= one_m;
    end else if (busy) begin
      if (zero_wr) begin
        zero_wr <= 1'b0;
      end else begin
        ga  <= xtime(ga, cfg.p, cfg.m);
        gb  <= xdiv(gb, cfg.p);
        cnt <= cnt + 1'b1;
        if (cnt == (9'd1 << cfg.m) - 9'd2) busy <= 1'b0;
      end
    end
  end

endmodule
