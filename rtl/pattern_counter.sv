// pattern_counter: the counter of the DATPG system. It steps through every
// input combination of the cell under test, 0 .. 2^W-1, one per clock while
// en is high, and wraps to 0. `last` is high while the count is at its final
// value, so the controller knows the current sweep ends with this cycle.
// clr has priority over en and returns the count to 0.
//
// Asynchronous active-low reset; q changes on the rising clock edge.
module pattern_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] q,
  output logic         last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (clr)    q <= '0;
    else if (en)     q <= q + 1'b1;
  end

  assign last = &q;
endmodule
