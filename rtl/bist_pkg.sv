// bist_pkg: types and constants shared by the deterministic test pattern
// generator (DATPG) and the built-in self test (BIST) of the parallel
// adder/subtractor (A/S).
//
// A test pattern for one A/S cell has four bits {m, cin, b, a}; the cell has
// two outputs {cout, sum}. The single stuck-at fault list of the cell names
// ten nets (the four inputs and the six internal/output nets of the cell).
// Fault number f < NSITE is "net f stuck-at-0", f >= NSITE is
// "net f-NSITE stuck-at-1", so the s-a-0 and s-a-1 halves of the list are
// contiguous. The fault list and the bit order are this design's choice.
//
// lfsr_taps() returns the feedback tap mask of a maximal-length LFSR of the
// given width (bit i set = stage i+1 feeds back), from the standard table of
// primitive trinomials/pentanomials. Widths outside 2..16 return 0.
package bist_pkg;

  localparam int unsigned CELL_IN  = 4;              // a, b, cin, m
  localparam int unsigned CELL_OUT = 2;              // sum, cout
  localparam int unsigned NPAT     = 1 << CELL_IN;   // exhaustive cell patterns
  localparam int unsigned NSITE    = 10;             // fault sites of the cell
  localparam int unsigned NFAULT   = 2 * NSITE;      // s-a-0 and s-a-1 on each

  // Nets of the A/S cell that carry a fault site.
  typedef enum logic [3:0] {
    SITE_A    = 4'd0,  // operand bit a
    SITE_B    = 4'd1,  // operand bit b
    SITE_CIN  = 4'd2,  // carry in
    SITE_M    = 4'd3,  // mode (0 add, 1 subtract)
    SITE_BX   = 4'd4,  // b xor m
    SITE_P    = 4'd5,  // propagate a xor bx
    SITE_SUM  = 4'd6,  // sum output
    SITE_G    = 4'd7,  // generate a and bx
    SITE_H    = 4'd8,  // p and cin
    SITE_COUT = 4'd9   // carry out
  } site_e;

  typedef struct packed {
    logic m;
    logic cin;
    logic b;
    logic a;
  } cell_pat_t;

  typedef struct packed {
    logic cout;
    logic sum;
  } cell_out_t;

  typedef logic [NFAULT-1:0] fault_vec_t;

  localparam fault_vec_t SA0_MASK = fault_vec_t'((1 << NSITE) - 1);
  localparam fault_vec_t SA1_MASK = ~SA0_MASK;

  // Summary the DATPG reports when it finishes.
  typedef struct packed {
    logic [5:0] n_detectable;  // faults some pattern detects
    logic [4:0] n_sel_sa0;     // patterns chosen for the s-a-0 faults
    logic [4:0] n_sel_sa1;     // patterns chosen for the s-a-1 faults
    logic [4:0] n_final;       // patterns left after the final minimization
  } datpg_stats_t;

  function automatic logic [31:0] lfsr_taps(input int unsigned width);
    case (width)
      2:  return 32'h0000_0003;  // x^2+x+1
      3:  return 32'h0000_0006;  // x^3+x^2+1
      4:  return 32'h0000_000C;  // x^4+x^3+1
      5:  return 32'h0000_0014;  // x^5+x^3+1
      6:  return 32'h0000_0030;  // x^6+x^5+1
      7:  return 32'h0000_0060;  // x^7+x^6+1
      8:  return 32'h0000_00B8;  // x^8+x^6+x^5+x^4+1
      9:  return 32'h0000_0110;  // x^9+x^5+1
      10: return 32'h0000_0240;  // x^10+x^7+1
      11: return 32'h0000_0500;  // x^11+x^9+1
      12: return 32'h0000_0829;  // x^12+x^6+x^4+x+1
      13: return 32'h0000_100D;  // x^13+x^4+x^3+x+1
      14: return 32'h0000_2015;  // x^14+x^5+x^3+x+1
      15: return 32'h0000_6000;  // x^15+x^14+1
      16: return 32'h0000_D008;  // x^16+x^15+x^13+x^4+1
      default: return 32'h0;
    endcase
  endfunction

endpackage
