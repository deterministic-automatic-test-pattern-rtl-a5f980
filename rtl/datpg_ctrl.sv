// datpg_ctrl: controller of the deterministic automatic test pattern
// generator (DATPG) for the A/S cell.
//
// Detection phase. For every fault of the fault list (bist_pkg: ten nets,
// first all stuck-at-0, then all stuck-at-1) the controller sets the fault
// select and the test (stuck-at) value of the faulty cell and lets the
// pattern counter sweep all 16 cell patterns. The comparator output for each
// (pattern, fault) pair is stored in a detection table, one fault vector per
// pattern. This takes NFAULT * NPAT = 320 cycles.
//
// Minimization. Three steps reduce the exhaustive set to a small test set:
//   1. s-a-0: greedy cover of the detectable stuck-at-0 faults. Each round
//      scans the 16 patterns (one per cycle), picks the one that detects the
//      most still-uncovered faults (lowest index on a tie), marks its faults
//      covered, and repeats until no pattern adds coverage.
//   2. s-a-1: the same for the detectable stuck-at-1 faults, independently.
//   3. Final: the union of both sets is pruned. Patterns are visited in
//      index order; one whose detected faults are all detected by the other
//      remaining patterns is dropped.
// The kept patterns are then written, in increasing index order, to the
// pattern memory (one per cycle, pat_we), and done rises with the summary in
// stats. The three-step minimization follows the order the generator is
// described in (s-a-0, s-a-1, final); the greedy rule and the pruning order
// are this design's choices.
//
// Timing: start is taken in IDLE or DONE. With r0 and r1 greedy rounds that
// add coverage, done rises after
//   NFAULT*NPAT + (1 + (r0+1)*(NPAT+1)) + (1 + (r1+1)*(NPAT+1)) + 2*NPAT
// cycles. busy is high meanwhile. Asynchronous active-low reset.
module datpg_ctrl
  import bist_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  // pattern counter
  output logic              cnt_clr,
  output logic              cnt_en,
  input  logic [CELL_IN-1:0] cnt_q,
  input  logic              cnt_last,
  // fault injection into the faulty cell
  output logic              fault_en,
  output site_e             fault_site,
  output logic              fault_test,
  // comparator
  input  logic              detect,
  // pattern memory write port
  output logic              pat_we,
  output logic [CELL_IN-1:0] pat_waddr,
  output cell_pat_t         pat_wdata,
  // status
  output logic              busy,
  output logic              done,
  output datpg_stats_t      stats
);
  typedef enum logic [2:0] {
    ST_IDLE, ST_DET, ST_INIT, ST_SCAN, ST_PICK, ST_FIN, ST_WRITE, ST_DONE
  } state_e;

  localparam int unsigned FW = $clog2(NFAULT);
  localparam int unsigned CW = $clog2(NFAULT + 1);

  state_e              state;
  fault_vec_t          det [NPAT];
  logic [FW-1:0]       fidx;
  fault_vec_t          unc;
  logic [NPAT-1:0]     sel0, sel1, sfin;
  logic [CELL_IN-1:0]  pidx;
  logic [CELL_IN-1:0]  best_idx;
  logic [CW-1:0]       best_cnt;
  logic                phase;         // 0: s-a-0 step, 1: s-a-1 step
  logic [CELL_IN:0]    wcnt;

  fault_vec_t          detectable;
  fault_vec_t          others;
  logic [CW-1:0]       scan_cnt;

  function automatic logic [CW-1:0] popcount(input fault_vec_t v);
    logic [CW-1:0] n = '0;
    for (int i = 0; i < NFAULT; i++) n += CW'(v[i]);
    return n;
  endfunction

  function automatic logic [4:0] popcount_pat(input logic [NPAT-1:0] v);
    logic [4:0] n = '0;
    for (int i = 0; i < NPAT; i++) n += 5'(v[i]);
    return n;
  endfunction

  always_comb begin
    detectable = '0;
    for (int p = 0; p < NPAT; p++) detectable |= det[p];
    others = '0;
    for (int p = 0; p < NPAT; p++)
      if (sfin[p] && (CELL_IN'(p) != pidx)) others |= det[p];
    scan_cnt = popcount(det[pidx] & unc);
  end

  // Counter and fault injection follow the detection phase.
  always_comb begin
    cnt_clr    = (state == ST_IDLE || state == ST_DONE) && start;
    cnt_en     = (state == ST_DET);
    fault_en   = (state == ST_DET);
    fault_site = site_e'((fidx >= FW'(NSITE)) ? fidx - FW'(NSITE) : fidx);
    fault_test = (fidx >= FW'(NSITE));
    pat_we     = (state == ST_WRITE) && sfin[pidx];
    pat_waddr  = wcnt[CELL_IN-1:0];
    pat_wdata  = cell_pat_t'(pidx);
    busy       = (state != ST_IDLE) && (state != ST_DONE);
    done       = (state == ST_DONE);
    stats.n_detectable = 6'(popcount(detectable));
    stats.n_sel_sa0    = popcount_pat(sel0);
    stats.n_sel_sa1    = popcount_pat(sel1);
    stats.n_final      = 5'(wcnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      for (int p = 0; p < NPAT; p++) det[p] <= '0;
      fidx     <= '0;
      unc      <= '0;
      sel0     <= '0;
      sel1     <= '0;
      sfin     <= '0;
      pidx     <= '0;
      best_idx <= '0;
      best_cnt <= '0;
      phase    <= 1'b0;
      wcnt     <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            for (int p = 0; p < NPAT; p++) det[p] <= '0;
            fidx  <= '0;
            sel0  <= '0;
            sel1  <= '0;
            sfin  <= '0;
            wcnt  <= '0;
            phase <= 1'b0;
            state <= ST_DET;
          end
        end

        ST_DET: begin
          det[cnt_q][fidx] <= detect;
          if (cnt_last) begin
            if (fidx == FW'(NFAULT - 1)) state <= ST_INIT;
            else                         fidx  <= fidx + 1'b1;
          end
        end

        ST_INIT: begin
          unc      <= detectable & (phase ? SA1_MASK : SA0_MASK);
          pidx     <= '0;
          best_cnt <= '0;
          best_idx <= '0;
          state    <= ST_SCAN;
        end

        ST_SCAN: begin
          if (scan_cnt > best_cnt) begin
            best_cnt <= scan_cnt;
            best_idx <= pidx;
          end
          pidx <= pidx + 1'b1;
          if (pidx == CELL_IN'(NPAT - 1)) state <= ST_PICK;
        end

        ST_PICK: begin
          pidx     <= '0;
          best_cnt <= '0;
          best_idx <= '0;
          if (best_cnt == '0) begin
            if (!phase) begin
              phase <= 1'b1;
              state <= ST_INIT;
            end else begin
              sfin  <= sel0 | sel1;
              state <= ST_FIN;
            end
          end else begin
            if (phase) sel1[best_idx] <= 1'b1;
            else       sel0[best_idx] <= 1'b1;
            unc   <= unc & ~det[best_idx];
            state <= ST_SCAN;
          end
        end

        ST_FIN: begin
          if (sfin[pidx] && ((det[pidx] & ~others) == '0)) sfin[pidx] <= 1'b0;
          pidx <= pidx + 1'b1;
          if (pidx == CELL_IN'(NPAT - 1)) begin
            wcnt  <= '0;
            state <= ST_WRITE;
          end
        end

        ST_WRITE: begin
          if (sfin[pidx]) wcnt <= wcnt + 1'b1;
          pidx <= pidx + 1'b1;
          if (pidx == CELL_IN'(NPAT - 1)) state <= ST_DONE;
        end

        default: state <= ST_IDLE;
      endcase
    end
  end

  // The counter must be at pattern 0 whenever a fault's sweep starts.
  a_sweep_aligned: assert property (@(posedge clk)
    cnt_clr |=> cnt_q == '0);
endmodule
