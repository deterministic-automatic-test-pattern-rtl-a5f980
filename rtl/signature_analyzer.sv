// signature_analyzer: multiple-input signature register (MISR) that
// compresses the responses of the parallel A/S into a W-bit signature.
//
// Each enabled clock the register shifts one place towards the MSB with the
// LFSR feedback (taps from bist_pkg::lfsr_taps(W)) entering bit 0, and the
// W response bits d are XORed into all stages in parallel:
//   sig' = {sig[W-2:0], ^(sig & TAPS)} ^ d.
// The default width of 5 takes the four sum bits and the carry out of the
// 4-bit A/S in one clock. A parallel-input register, its width and its
// polynomial are this design's choices.
//
// clr (priority over en) and reset clear the signature to 0. Asynchronous
// active-low reset.
module signature_analyzer
  import bist_pkg::*;
#(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);
  localparam logic [W-1:0] TAPS = W'(lfsr_taps(W));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (clr) sig <= '0;
    else if (en)  sig <= {sig[W-2:0], ^(sig & TAPS)} ^ d;
  end
endmodule
