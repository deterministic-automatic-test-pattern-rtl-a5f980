// parallel_as: W-bit parallel adder/subtractor, the circuit under test of the
// built-in self test. W = 4 is the width of the A/S in the design.
//
// W as_cell instances form a ripple-carry chain: cell i takes a[i], b[i], the
// common mode bit m and the carry out of cell i-1. Cell 0 takes the external
// carry in cin. For ordinary use cin = m: m = 0 gives s = a + b, m = 1 gives
// s = a - b (two's complement, cout = 1 means no borrow). The carry in is a
// port of its own, rather than tied to m inside, so that a test pattern can
// set every input of cell 0 freely; this is this design's choice.
//
// Purely combinational, no clock.
module parallel_as #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         m,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  assign cout = c[W];

  for (genvar i = 0; i < W; i++) begin : g_cell
    as_cell u_cell (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .m   (m),
      .sum (s[i]),
      .cout(c[i+1])
    );
  end
endmodule
