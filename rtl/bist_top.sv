// bist_top: built-in self test system for a 4-bit parallel adder/subtractor
// with deterministic test pattern generation.
//
// The system has two test phases and a functional mode:
//   * DATPG (atpg_start): the generator (datpg) fault-simulates one A/S cell
//     against its single stuck-at fault list, keeps the smallest set of cell
//     patterns it finds, and stores them in its pattern memory.
//   * BIST (bist_start): the controller (bist_ctrl) drives the parallel A/S
//     either with those few patterns (bist_src = 0) or with the full LFSR
//     sequence (bist_src = 1), compresses the responses in the signature
//     analyzer and compares the signature with `golden`.
//   * Functional: outside a BIST run the A/S computes func_a +/- func_b
//     (func_m = 1 subtracts; drive func_cin = func_m for plain two's
//     complement) and returns the result on func_s / func_cout.
// During a BIST run the A/S inputs come from the controller (test_mode); its
// outputs stay visible on func_s / func_cout.
//
// Parameters: W is the adder width (4). The LFSR is 2W+2 bits wide so it
// covers every adder input, the signature is W+1 bits (sum and carry out).
// Start the DATPG before a deterministic BIST run; bist_start is ignored
// while the generator is busy. Single clock, asynchronous active-low reset.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // functional use of the A/S
  input  logic [W-1:0]       func_a,
  input  logic [W-1:0]       func_b,
  input  logic               func_m,
  input  logic               func_cin,
  output logic [W-1:0]       func_s,
  output logic               func_cout,
  // deterministic test pattern generation
  input  logic               atpg_start,
  output logic               atpg_busy,
  output logic               atpg_done,
  output logic [CELL_IN:0]   n_pat,
  output datpg_stats_t       atpg_stats,
  // built-in self test
  input  logic               bist_start,
  input  logic               bist_src,
  input  logic [W:0]         golden,
  output logic               bist_busy,
  output logic               bist_done,
  output logic               bist_pass,
  output logic [W:0]         signature,
  output logic [2*W+2:0]     bist_n_applied
);
  localparam int unsigned LW = 2 * W + 2;
  localparam int unsigned SW = W + 1;

  logic [CELL_IN-1:0] pat_raddr;
  cell_pat_t          pat_rdata;
  logic               lfsr_load, lfsr_en;
  logic [LW-1:0]      lfsr_q;
  logic               sa_clr, sa_en;
  logic               test_mode;
  logic [W-1:0]       t_a, t_b;
  logic               t_m, t_cin;
  logic [W-1:0]       cut_a, cut_b;
  logic               cut_m, cut_cin;

  datpg u_datpg (
    .clk, .rst_n, .start(atpg_start),
    .busy(atpg_busy), .done(atpg_done), .n_pat, .stats(atpg_stats),
    .pat_raddr, .pat_rdata
  );

  lfsr #(.W(LW)) u_lfsr (
    .clk, .rst_n, .load(lfsr_load), .en(lfsr_en), .q(lfsr_q)
  );

  bist_ctrl #(.W(W), .LW(LW), .SW(SW)) u_bist (
    .clk, .rst_n, .start(bist_start && !atpg_busy), .src(bist_src), .golden,
    .n_pat, .pat_raddr, .pat_rdata,
    .lfsr_load, .lfsr_en, .lfsr_q,
    .sa_clr, .sa_en, .sig(signature),
    .test_mode, .t_a, .t_b, .t_m, .t_cin,
    .busy(bist_busy), .done(bist_done), .pass(bist_pass),
    .n_applied(bist_n_applied)
  );

  // Test-mode input selection of the circuit under test.
  always_comb begin
    cut_a   = test_mode ? t_a   : func_a;
    cut_b   = test_mode ? t_b   : func_b;
    cut_m   = test_mode ? t_m   : func_m;
    cut_cin = test_mode ? t_cin : func_cin;
  end

  parallel_as #(.W(W)) u_cut (
    .a(cut_a), .b(cut_b), .m(cut_m), .cin(cut_cin),
    .s(func_s), .cout(func_cout)
  );

  signature_analyzer #(.W(SW)) u_sa (
    .clk, .rst_n, .clr(sa_clr), .en(sa_en), .d({func_cout, func_s}),
    .sig(signature)
  );
endmodule
