// fa_pkg: types and constants shared by the stuck-at fault tester.
//
// The full adder under test is built from two half adders, and every line
// of that netlist is a possible fault site:
//
//   p    = a ^ b        (first half-adder sum)
//   g    = a & b        (first half-adder carry)
//   t    = p & cin      (second half-adder carry)
//   sum  = p ^ cin
//   cout = g | t
//
// A single stuck-at fault is a site plus the value the line is stuck at
// (0 for stuck-at-0, 1 for stuck-at-1). The default fault, g stuck-at-0,
// is the one whose output matches the published truth table of the
// tester. Choosing that table as the reference is a choice of this design;
// the site list follows the half-adder structure, which is also a choice.
package fa_pkg;

  // Lines of the full-adder netlist that can carry a stuck-at fault.
  typedef enum logic [2:0] {
    SITE_A    = 3'd0,  // input a (stem, feeds p and g)
    SITE_B    = 3'd1,  // input b (stem, feeds p and g)
    SITE_CIN  = 3'd2,  // carry-in (stem, feeds sum and t)
    SITE_P    = 3'd3,  // a ^ b
    SITE_G    = 3'd4,  // a & b
    SITE_T    = 3'd5,  // (a ^ b) & cin
    SITE_SUM  = 3'd6,  // sum output
    SITE_COUT = 3'd7   // carry output
  } fa_site_e;

  // One single stuck-at fault.
  typedef struct packed {
    fa_site_e site;
    logic     stuck;  // value the line is forced to
  } fa_fault_t;

  localparam int unsigned FA_FAULT_W = $bits(fa_fault_t);
  localparam int unsigned FA_NUM_SITES = 8;

  // Fault that reproduces the reference truth table: a & b stuck-at-0.
  localparam fa_fault_t FA_G_SA0 = '{site: SITE_G, stuck: 1'b0};

endpackage
