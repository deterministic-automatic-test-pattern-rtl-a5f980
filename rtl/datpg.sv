// datpg: deterministic automatic test pattern generation system for one cell
// of the parallel adder/subtractor.
//
// It wires together the four parts of the generator: the pattern counter,
// which applies every cell pattern {m, cin, b, a} in turn; a fault-free
// as_cell and a faulty copy (as_cell_fault) that both receive the counter
// value; the comparator, which flags a pattern whose outputs differ between
// the two; and the controller (datpg_ctrl), which steps through the stuck-at
// fault list, records the detection table and minimizes it. The minimal
// patterns end up in a pattern memory whose read port (pat_raddr ->
// pat_rdata) is brought out for the BIST controller; n_pat of its words are
// valid once done is high.
//
// Because every cell of the parallel A/S is identical, patterns found for one
// cell serve the whole adder: the BIST applies the same a and b bit to every
// bit position.
//
// Timing: see datpg_ctrl (about 480 cycles from start to done for the A/S
// cell). Asynchronous active-low reset.
module datpg
  import bist_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic [CELL_IN:0]   n_pat,
  output datpg_stats_t       stats,
  input  logic [CELL_IN-1:0] pat_raddr,
  output cell_pat_t          pat_rdata
);
  logic               cnt_clr, cnt_en, cnt_last;
  logic [CELL_IN-1:0] cnt_q;
  cell_pat_t          pat;
  cell_out_t          good, bad;
  logic               fault_en, fault_test, detect;
  site_e              fault_site;
  logic               pat_we;
  logic [CELL_IN-1:0] pat_waddr;
  cell_pat_t          pat_wdata;

  pattern_counter #(.W(CELL_IN)) u_counter (
    .clk, .rst_n, .clr(cnt_clr), .en(cnt_en), .q(cnt_q), .last(cnt_last)
  );

  assign pat = cell_pat_t'(cnt_q);

  as_cell u_good (
    .a(pat.a), .b(pat.b), .cin(pat.cin), .m(pat.m),
    .sum(good.sum), .cout(good.cout)
  );

  as_cell_fault u_faulty (
    .a(pat.a), .b(pat.b), .cin(pat.cin), .m(pat.m),
    .fault_en, .fault_site, .test(fault_test),
    .sum(bad.sum), .cout(bad.cout)
  );

  response_comparator #(.W(CELL_OUT)) u_cmp (
    .good(good), .faulty(bad), .detect(detect)
  );

  datpg_ctrl u_ctrl (
    .clk, .rst_n, .start,
    .cnt_clr, .cnt_en, .cnt_q, .cnt_last,
    .fault_en, .fault_site, .fault_test,
    .detect,
    .pat_we, .pat_waddr, .pat_wdata,
    .busy, .done, .stats
  );

  pattern_mem #(.W(CELL_IN), .DEPTH(NPAT)) u_mem (
    .clk, .rst_n, .we(pat_we), .waddr(pat_waddr), .wdata(pat_wdata),
    .raddr(pat_raddr), .rdata(pat_rdata)
  );

  assign n_pat = stats.n_final;
endmodule
