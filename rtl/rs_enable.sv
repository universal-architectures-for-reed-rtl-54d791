// rs_enable: per-codeword enable of the decoder's function blocks.
//
// The decoder uses two of these. RS_Enable1 samples the external RS_EN at the
// first symbol of each codeword: when it is low the syndrome calculator stays
// idle and the codeword goes through uncorrected. RS_Enable2 samples, when a
// codeword leaves the syndrome stage, whether it is to be decoded at all: only
// if RS_Enable1 allowed it and the syndromes are not all zero ("no error"), so
// the key-equation solver and the Chien search stay idle for clean codewords.
// en changes only on a frame pulse and so is constant over a codeword; it
// resets to 0. The two enable blocks and their inputs are the document's; the
// sampling at codeword boundaries is this design's choice.
module rs_enable (
  input  logic clk,
  input  logic rst_n,
  input  logic frame,    // a codeword enters the controlled stage
  input  logic en_in,    // enable requested for it
  input  logic skip,     // nothing to do for it (no error)
  output logic en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     en <= 1'b0;
    else if (frame) en <= en_in && !skip;
  end

endmodule
