// lfsr: Fibonacci linear feedback shift register, the pseudo-random test
// pattern source of the BIST.
//
// Each enabled clock shifts the register one place towards the MSB and feeds
// the XOR of the tapped stages into bit 0. The taps come from
// bist_pkg::lfsr_taps(W) and give a maximal-length sequence: every non-zero
// W-bit value once in 2^W-1 clocks. The default width of 10 covers every
// input of the 4-bit parallel A/S ({cin, m, b[3:0], a[3:0]}), so one period
// applies all non-zero input vectors; width, polynomial and seed are this
// design's choices.
//
// load (priority over en) and reset set the register to SEED, which must be
// non-zero. Asynchronous active-low reset.
module lfsr
  import bist_pkg::*;
#(
  parameter int unsigned W    = 10,
  parameter logic [W-1:0] SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [W-1:0] q
);
  localparam logic [W-1:0] TAPS = W'(lfsr_taps(W));

  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (load) q <= SEED;
    else if (en)   q <= {q[W-2:0], fb};
  end

  initial begin
    assert (TAPS != '0) else $error("lfsr: no tap table for width %0d", W);
    assert (SEED != '0) else $error("lfsr: SEED must be non-zero");
  end
endmodule
