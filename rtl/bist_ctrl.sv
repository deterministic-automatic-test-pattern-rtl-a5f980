// bist_ctrl: built-in self test controller for the W-bit parallel A/S.
//
// On start it clears the signature analyzer, reloads the LFSR seed and puts
// the A/S into test mode. It then applies one test vector per clock and
// enables the signature analyzer on every one of those clocks:
//   src = 0 (deterministic): the n_pat minimal cell patterns from the DATPG
//     pattern memory, read at addresses 0 .. n_pat-1. A cell pattern
//     {m, cin, b, a} is spread over the whole adder: every bit of the A
//     operand gets a, every bit of B gets b, and m and the carry into cell 0
//     are taken as they are. Cell 0 thus sees exactly the generated pattern
//     and the carry chain carries it on to the higher cells.
//   src = 1 (pseudo-random): the full LFSR sequence, 2^LW-1 vectors, with
//     the LFSR state read as {cin, m, b, a}.
// After the last vector the controller leaves test mode and raises done;
// pass is then high if the signature equals `golden`, the signature of a
// fault-free A/S for the chosen source. done, pass and n_applied hold until
// the next start.
//
// Timing: start is taken when not busy. With N vectors, test_mode is high
// for the N clock cycles after the edge that takes start, one vector per
// cycle, and done rises on the edge that ends the last of them (N = 0: done
// rises on the edge that takes start). Spreading a cell pattern over all bits and the
// comparison against an externally supplied golden signature are this
// design's choices. Asynchronous active-low reset.
module bist_ctrl
  import bist_pkg::*;
#(
  parameter int unsigned W    = 4,
  parameter int unsigned LW   = 2 * W + 2,
  parameter int unsigned SW   = W + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               src,        // 0: DATPG patterns, 1: LFSR
  input  logic [SW-1:0]      golden,
  // DATPG pattern memory
  input  logic [CELL_IN:0]   n_pat,
  output logic [CELL_IN-1:0] pat_raddr,
  input  cell_pat_t          pat_rdata,
  // LFSR
  output logic               lfsr_load,
  output logic               lfsr_en,
  input  logic [LW-1:0]      lfsr_q,
  // signature analyzer
  output logic               sa_clr,
  output logic               sa_en,
  input  logic [SW-1:0]      sig,
  // test inputs of the A/S
  output logic               test_mode,
  output logic [W-1:0]       t_a,
  output logic [W-1:0]       t_b,
  output logic               t_m,
  output logic               t_cin,
  // status
  output logic               busy,
  output logic               done,
  output logic               pass,
  output logic [LW:0]        n_applied
);
  typedef enum logic [1:0] {ST_IDLE, ST_APPLY, ST_DONE} state_e;

  state_e        state;
  logic          src_q;
  logic [LW:0]   idx;
  logic [LW:0]   target;

  always_comb begin
    target    = src ? (LW+1)'((1 << LW) - 1) : (LW+1)'(n_pat);
    test_mode = (state == ST_APPLY);
    busy      = (state == ST_APPLY);
    done      = (state == ST_DONE);
    pass      = done && (sig == golden);
    sa_clr    = !busy && start;
    lfsr_load = !busy && start;
    sa_en     = test_mode;
    lfsr_en   = test_mode && src_q;
    pat_raddr = idx[CELL_IN-1:0];
    if (src_q) begin
      {t_cin, t_m, t_b, t_a} = lfsr_q[2*W+1:0];
    end else begin
      t_a   = {W{pat_rdata.a}};
      t_b   = {W{pat_rdata.b}};
      t_m   = pat_rdata.m;
      t_cin = pat_rdata.cin;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      src_q     <= 1'b0;
      idx       <= '0;
      n_applied <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            src_q     <= src;
            idx       <= '0;
            n_applied <= target;
            state     <= (target == '0) ? ST_DONE : ST_APPLY;
          end
        end
        ST_APPLY: begin
          idx <= idx + 1'b1;
          if (idx == n_applied - 1'b1) state <= ST_DONE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  initial assert (LW >= 2 * W + 2)
    else $error("bist_ctrl: LFSR narrower than the A/S inputs");
endmodule
