// fa_faulty: a full adder with one single stuck-at fault injected.
//
// Same two-half-adder netlist as full_adder. The parameter FAULT names one
// line of the netlist (input stem, internal net or output) and the value
// it is stuck at; that line is overridden with the constant wherever it is
// read, so the fault propagates through the downstream gates exactly as a
// physical stuck line would. Each faulty copy of the tester is one
// instance of this module with its own FAULT. The site list and the
// default (a & b stuck-at-0, which reproduces the reference truth table)
// are choices of this design.
//
// Ports: a, b, cin in; sum, cout out. Purely combinational.
module fa_faulty
  import fa_pkg::*;
#(
  parameter fa_fault_t FAULT = FA_G_SA0
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  // Returns the stuck value if this line is the faulty one, else the line.
  function automatic logic inject(input fa_site_e here, input logic val);
    return (FAULT.site == here) ? FAULT.stuck : val;
  endfunction

  logic a_f, b_f, cin_f, p, g, t;

  always_comb begin
    a_f   = inject(SITE_A, a);
    b_f   = inject(SITE_B, b);
    cin_f = inject(SITE_CIN, cin);
    p     = inject(SITE_P, a_f ^ b_f);
    g     = inject(SITE_G, a_f & b_f);
    t     = inject(SITE_T, p & cin_f);
    sum   = inject(SITE_SUM, p ^ cin_f);
    cout  = inject(SITE_COUT, g | t);
  end

endmodule
