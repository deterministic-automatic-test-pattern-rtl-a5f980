// pattern_mem: small register-file memory that holds the minimal test
// patterns produced by the DATPG, DEPTH words of W bits. One synchronous
// write port (we, waddr, wdata, written on the rising edge) and one
// asynchronous read port (raddr -> rdata). Contents are cleared by the
// asynchronous active-low reset so that an unwritten word reads as 0.
module pattern_mem #(
  parameter int unsigned W     = 4,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];
endmodule
