// as_cell: one basic cell of the parallel adder/subtractor (A/S).
//
// The mode bit m selects addition (m = 0) or subtraction (m = 1). The b
// operand is passed through an XOR with m, so in subtract mode the cell adds
// the complement of b, and a full adder then forms
//   sum  = a ^ bx ^ cin
//   cout = (a & bx) | ((a ^ bx) & cin)      with bx = b ^ m.
// Chained with cin of cell 0 set to 1 for subtraction this gives the
// two's-complement difference. The XOR-on-b structure is the usual A/S cell;
// the gate-level split into the nets bx, p, g and h is this design's choice
// and is the one the fault list in bist_pkg refers to.
//
// Purely combinational, no clock.
module as_cell (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic m,
  output logic sum,
  output logic cout
);
  logic bx, p, g, h;

  always_comb begin
    bx   = b ^ m;
    p    = a ^ bx;
    g    = a & bx;
    h    = p & cin;
    sum  = p ^ cin;
    cout = g | h;
  end
endmodule
