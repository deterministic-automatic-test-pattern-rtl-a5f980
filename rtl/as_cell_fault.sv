// as_cell_fault: model of the A/S cell with one injectable single stuck-at
// fault, used as the faulty circuit under test by the deterministic test
// pattern generator.
//
// It has the same gates as as_cell (bx = b^m, p = a^bx, g = a&bx, h = p&cin,
// sum = p^cin, cout = g|h). When fault_en is high, the net chosen by
// fault_site is forced to the value of the test bit: test = 0 models a
// stuck-at-0 fault, test = 1 a stuck-at-1 fault, as in the two operations of
// the generator. A fault on an input net affects every gate that net feeds
// (stem fault); faults on individual fanout branches are not modelled, which
// is this design's choice. With fault_en low the module equals as_cell.
//
// Purely combinational, no clock.
module as_cell_fault
  import bist_pkg::*;
(
  input  logic  a,
  input  logic  b,
  input  logic  cin,
  input  logic  m,
  input  logic  fault_en,    // inject the fault
  input  site_e fault_site,  // net that is stuck
  input  logic  test,        // stuck-at value
  output logic  sum,
  output logic  cout
);
  // Returns the value of net `site` given its fault-free value v.
  function automatic logic inj(input site_e site, input logic v,
                               input logic en, input site_e sel,
                               input logic val);
    return (en && (sel == site)) ? val : v;
  endfunction

  logic fa, fb, fcin, fm, bx, p, g, h;

  always_comb begin
    fa   = inj(SITE_A,    a,         fault_en, fault_site, test);
    fb   = inj(SITE_B,    b,         fault_en, fault_site, test);
    fcin = inj(SITE_CIN,  cin,       fault_en, fault_site, test);
    fm   = inj(SITE_M,    m,         fault_en, fault_site, test);
    bx   = inj(SITE_BX,   fb ^ fm,   fault_en, fault_site, test);
    p    = inj(SITE_P,    fa ^ bx,   fault_en, fault_site, test);
    g    = inj(SITE_G,    fa & bx,   fault_en, fault_site, test);
    h    = inj(SITE_H,    p & fcin,  fault_en, fault_site, test);
    sum  = inj(SITE_SUM,  p ^ fcin,  fault_en, fault_site, test);
    cout = inj(SITE_COUT, g | h,     fault_en, fault_site, test);
  end
endmodule
