// tb_fa_ref_pkg: reference behaviour of a full adder with one stuck-at
// fault, for the testbenches.
//
// The effect of each fault site is written out by hand, case by case, from
// the adder's equations (sum = a ^ b ^ cin, cout = majority), rather than
// by re-evaluating the gate netlist, so that it checks the RTL
// independently. Also holds the reference truth table of the tester: for
// eight generator values, the expected sum/carry, the sum/carry of the
// copy with a & b stuck-at-0, and the fault flag.
package tb_fa_ref_pkg;
  import fa_pkg::*;

  // {cout, sum} of a fault-free full adder.
  function automatic logic [1:0] good_fa(input logic a, input logic b, input logic c);
    return 2'(a) + 2'(b) + 2'(c);
  endfunction

  // {cout, sum} of the full adder with fault f.
  function automatic logic [1:0] faulty_fa(input fa_fault_t f, input logic a,
                                           input logic b, input logic c);
    logic v, maj;
    v   = f.stuck;
    maj = (a & b) | (a & c) | (b & c);
    case (f.site)
      SITE_A:    return good_fa(v, b, c);
      SITE_B:    return good_fa(a, v, c);
      SITE_CIN:  return good_fa(a, b, v);
      SITE_P:    return {(a & b) | (v & c), v ^ c};
      SITE_G:    return {v | ((a ^ b) & c), a ^ b ^ c};
      SITE_T:    return {(a & b) | v, a ^ b ^ c};
      SITE_SUM:  return {maj, v};
      default:   return {v, a ^ b ^ c};  // SITE_COUT
    endcase
  endfunction

  // One row of the reference truth table.
  typedef struct packed {
    logic [3:0] lcg;
    logic       esum;
    logic       ecarry;
    logic       tsum;
    logic       tcarry;
    logic       fault;
  } tt_row_t;

  localparam int unsigned TT_ROWS = 8;
  localparam tt_row_t TT [TT_ROWS] = '{
    '{4'b0001, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0},
    '{4'b0011, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0},
    '{4'b0100, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0},
    '{4'b0110, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1},
    '{4'b0111, 1'b1, 1'b1, 1'b1, 1'b0, 1'b1},
    '{4'b1100, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1},
    '{4'b1110, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1},
    '{4'b1111, 1'b1, 1'b1, 1'b1, 1'b0, 1'b1}
  };

endpackage
