// rs_sram: single-port synchronous RAM, written as an array.
//
// Stands for the SRAM macros of the decoder: the two 512x8 banks of the codeword
// buffer and the 256x8 inversion table. One access per cycle: a write when we is
// high, otherwise a read whose data appears on rdata the following cycle. The
// contents are not reset; every location is written before it is read.
module rs_sram #(
  parameter int DEPTH = 512,
  parameter int W     = 8
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
