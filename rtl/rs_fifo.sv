// rs_fifo: codeword buffer of two single-port SRAM banks.
//
// Holds each received codeword while it is decoded, so that it can be corrected
// on the way out, and lets the syndrome stage read it a second time when
// n-k > 16. Codewords alternate between the two BANK_DEPTH x 8 banks: one bank
// is filled by the input (and re-read by the second syndrome pass) while the
// other is read out by the correction stage. Three ports: a write port, read
// port A (second syndrome pass) and read port B (output); each cycle at most
// one port may use a given bank, which the controller guarantees and an
// assertion checks. Read data appears one cycle after the read request.
// Two 512 x 8 banks are the document's size; bank ping-pong and the port
// arrangement are this design's choice.
module rs_fifo #(
  parameter int BANK_DEPTH = 512,
  parameter int W          = 8
) (
  input  logic                          clk,
  input  logic                          wr_en,
  input  logic                          wr_bank,
  input  logic [$clog2(BANK_DEPTH)-1:0] wr_addr,
  input  logic [W-1:0]                  wr_data,
  input  logic                          ra_en,
  input  logic                          ra_bank,
  input  logic [$clog2(BANK_DEPTH)-1:0] ra_addr,
  output logic [W-1:0]                  ra_data,
  input  logic                          rb_en,
  input  logic                          rb_bank,
  input  logic [$clog2(BANK_DEPTH)-1:0] rb_addr,
  output logic [W-1:0]                  rb_data
);

  localparam int AW = $clog2(BANK_DEPTH);

  logic [W-1:0] rdata [2];
  logic         ra_sel, rb_sel;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic          hit_w, hit_a, hit_b;
    logic [AW-1:0] addr;
    assign hit_w = wr_en && (wr_bank == 1'(b));
    assign hit_a = ra_en && (ra_bank == 1'(b));
    assign hit_b = rb_en && (rb_bank == 1'(b));
    assign addr  = hit_w ? wr_addr : hit_a ? ra_addr : rb_addr;

    rs_sram #(.DEPTH(BANK_DEPTH), .W(W)) u_bank (
      .clk(clk), .en(hit_w | hit_a | hit_b), .we(hit_w),
      .addr(addr), .wdata(wr_data), .rdata(rdata[b])
    );

    a_one_port: assert property (@(posedge clk) 32'(hit_w) + 32'(hit_a) + 32'(hit_b) <= 1)
      else $error("rs_fifo: two ports on bank %0d", b);
  end

  always_ff @(posedge clk) begin
    ra_sel <= ra_bank;
    rb_sel <= rb_bank;
  end

  assign ra_data = rdata[ra_sel];
  assign rb_data = rdata[rb_sel];

endmodule
