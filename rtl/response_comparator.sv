// response_comparator: the comparator of the DATPG system. It compares the
// outputs of the fault-free cell with those of the faulty cell for the
// pattern currently applied; any differing bit means the pattern detects the
// injected fault.
//
// Purely combinational, no clock.
module response_comparator #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] good,
  input  logic [W-1:0] faulty,
  output logic         detect
);
  assign detect = |(good ^ faulty);
endmodule
